// tb_ble: checks the basic logic element in both modes. Combinational mode:
// the output equals the LUT function of the present inputs. Registered mode:
// the output equals the LUT function of the inputs sampled at the previous
// rising edge, and reset clears it.
module tb_ble;
  localparam int unsigned K = 4;
  logic clk = 0, rst_n = 0, run = 0;
  logic [(1<<K):0] cfg;
  logic [K-1:0] in;
  logic out;
  int checks = 0, failures = 0;

  ble #(.K(K)) dut (.clk(clk), .rst_n(rst_n), .run(run), .cfg(cfg), .in(in), .out(out));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic f(input logic [15:0] tbl, input logic [3:0] v);
    return tbl[v];
  endfunction

  task automatic expect_out(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s out=%b exp=%b", what, out, exp);
    end
  endtask

  initial begin
    logic [15:0] tbl;
    logic        prev;
    tbl = 16'h6996;
    cfg = {1'b0, tbl};
    in  = '0;
    #12 rst_n = 1;
    #1;
    checks++;
    if (out !== 1'b0) begin failures++; $display("FAIL run low must hold the LUT at 0"); end
    run = 1;
    // combinational mode
    for (int v = 0; v < 16; v++) begin
      in = 4'(v); #1;
      expect_out(f(tbl, in), "comb");
    end
    // registered mode: output lags by one edge
    tbl = 16'hA5C3;
    @(negedge clk);
    cfg = {1'b1, tbl};
    in  = 4'd3;
    @(posedge clk); #1;
    prev = f(tbl, 4'd3);
    expect_out(prev, "reg first");
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      in = 4'($urandom);
      #1;
      expect_out(prev, "reg holds between edges");
      @(posedge clk); #1;
      prev = f(tbl, in);
      expect_out(prev, "reg after edge");
    end
    // reset clears the flip-flop
    in = 4'd0;   // tbl[0] = 1, so the LUT output is 1
    @(negedge clk);
    rst_n = 0; #1;
    expect_out(1'b0, "reset");
    rst_n = 1;
    // switch back to combinational: LUT value appears at once
    cfg[16] = 1'b0; #1;
    expect_out(tbl[0], "mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
