// tb_lut: exhaustive check of the 4-input LUT against the truth-table rule
// out = table bit number {in3,in2,in1,in0}, for fixed and random tables.
module tb_lut;
  localparam int unsigned K = 4;
  logic [(1<<K)-1:0] cfg;
  logic [K-1:0]      in;
  logic              out;
  int checks = 0, failures = 0;

  lut #(.K(K)) dut (.cfg(cfg), .in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_table(input logic [15:0] tbl);
    cfg = tbl;
    for (int v = 0; v < 16; v++) begin
      logic exp;
      in = 4'(v);
      #1;
      // independent reference: walk the table with a shift
      exp = 1'((tbl >> v) & 16'h1);
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL table=%h in=%0d out=%b exp=%b", tbl, v, out, exp);
      end
    end
  endtask

  initial begin
    check_table(16'h6996);        // 4-input XOR
    check_table(16'h8000);        // 4-input AND
    check_table(16'hFFFE);        // 4-input OR
    check_table(16'h0001);        // NOR
    for (int r = 0; r < 20; r++) check_table(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
