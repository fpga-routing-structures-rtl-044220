// tb_logic_block: programs a 4-BLE cluster (I = 10, K = 4, fully connected)
// with a small sequential circuit that uses cluster inputs, the feedback of
// BLE outputs through the interconnect matrix, combinational and registered
// BLEs, and compares it cycle by cycle with a behavioural model:
//   BLE0 (reg):  q0 <= in[0] ^ q0               (toggle, feedback of itself)
//   BLE1 (comb): o1  = T1(in[3], in[5], in[7], in[9])   random 4-input table
//   BLE2 (comb): o2  = o1 & in[2]               (feedback of BLE1)
//   BLE3 (reg):  q3 <= o2 | q0                  (feedbacks of BLE2 and BLE0)
module tb_logic_block;
  localparam int unsigned I = 10, N = 4, K = 4;
  localparam int unsigned SELW = 4, IMB = N*K*SELW, BB = 17;
  localparam int unsigned LBB = IMB + N*BB;
  localparam logic [3:0] NONE = 4'd15;

  logic clk = 0, rst_n = 0, run = 0;
  logic [LBB-1:0] cfg;
  logic [I-1:0] lb_in;
  logic [N-1:0] lb_out;
  int checks = 0, failures = 0;
  int seq_cycles = 0, fb_used = 0;

  logic_block #(.I(I), .N(N), .K(K)) dut (.clk(clk), .rst_n(rst_n), .run(run), .cfg(cfg), .lb_in(lb_in), .lb_out(lb_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_row(int b, int p, logic [3:0] s);
    cfg[(b*K + p)*SELW +: SELW] = s;
  endtask
  task automatic set_ble(int b, logic [15:0] tbl, logic reg_mode);
    cfg[IMB + b*BB +: BB] = {reg_mode, tbl};
  endtask

  logic [15:0] t1;
  logic q0, q3;

  function automatic logic [3:0] model_out(logic [I-1:0] x, logic mq0, logic mq3);
    logic o1, o2;
    o1 = t1[{x[9], x[7], x[5], x[3]}];
    o2 = o1 & x[2];
    return {mq3, o2, o1, mq0};
  endfunction

  initial begin
    t1 = 16'($urandom);
    cfg = '0;
    for (int b = 0; b < N; b++) for (int p = 0; p < K; p++) set_row(b, p, NONE);
    // candidates: 0..9 cluster inputs, 10..13 feedbacks
    set_row(0, 0, 4'd0);  set_row(0, 1, 4'd10);
    set_row(1, 0, 4'd3);  set_row(1, 1, 4'd5); set_row(1, 2, 4'd7); set_row(1, 3, 4'd9);
    set_row(2, 0, 4'd11); set_row(2, 1, 4'd2);
    set_row(3, 0, 4'd12); set_row(3, 1, 4'd10);
    set_ble(0, 16'h6666, 1'b1);
    set_ble(1, t1,       1'b0);
    set_ble(2, 16'h8888, 1'b0);
    set_ble(3, 16'hEEEE, 1'b1);
    lb_in = '0;
    q0 = 0; q3 = 0;
    #12 rst_n = 1; run = 1;
    for (int c = 0; c < 300; c++) begin
      logic [3:0] m;
      @(negedge clk);
      lb_in = I'($urandom);
      #1;
      m = model_out(lb_in, q0, q3);
      checks++;
      if (lb_out !== m) begin
        failures++;
        $display("FAIL cycle %0d lb_out=%b model=%b", c, lb_out, m);
      end
      if (m[1] && lb_in[2]) fb_used++;
      @(posedge clk);
      q3 = m[2] | q0;
      q0 = lb_in[0] ^ q0;
      seq_cycles++;
    end
    checks++;
    if (fb_used == 0) begin failures++; $display("FAIL feedback path never carried a 1"); end
    $display("registered cycles %0d, feedback-carried ones %0d", seq_cycles, fb_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
