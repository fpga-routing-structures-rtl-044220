// tb_fpga_tile: loads one tile (W=16, S=4, stagger position 0, N=4, K=4,
// I=10, Fc=0.5W) through its serial configuration chain and checks a small
// routed circuit on its channel ends:
//   west track 4 (a wire ending here) --Wilton L->T--> vertical track 12
//     --> input pin 0 --> BLE0 (combinational NOT) --> output 0 --> H track 2
//     (a pass-through wire, so it appears at both the west and east ends);
//   north track 1 (pass-through) --> pin 1 --> BLE1 (registered buffer)
//     --> output 1 --> H track 5, joined to vertical track 5 by the
//     disjoint switch, so it appears on all four ends of track 5;
//   east track 8 (a wire ending here) --Wilton R->B--> south track 0.
// Every output bit of every side is compared with the expected routing.
module tb_fpga_tile;
  localparam int unsigned W = 16, TB = 280;
  logic clk = 0, rst_n = 0, run = 0, cfg_rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [W-1:0] w_in, s_in, e_in, n_in, w_out, s_out, e_out, n_out;
  logic [TB-1:0] cfgv;
  int checks = 0, failures = 0;

  fpga_tile dut (.clk(clk), .rst_n(rst_n), .run(run), .cfg_rst_n(cfg_rst_n), .cfg_en(cfg_en),
    .cfg_in(cfg_in), .cfg_out(cfg_out),
    .w_in(w_in), .s_in(s_in), .e_in(e_in), .n_in(n_in),
    .w_out(w_out), .s_out(s_out), .e_out(e_out), .n_out(n_out));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    logic q1;
    // Layout: SB 0..35 (12 disjoint bits, then 6 Wilton groups of 4),
    // CB-in 36..115, CB-out 116..147, matrix 148..211, BLEs 212..279.
    cfgv = '0;
    cfgv[12 + 2*4 + 1] = 1'b1;          // Wilton L-T, local 1 (track 4 <-> 12)
    cfgv[12 + 5*4 + 2] = 1'b1;          // Wilton R-B, local 2 (track 8 <-> 0)
    cfgv[3]            = 1'b1;          // disjoint, 4th pass track = track 5
    cfgv[36 + 0*8 + 6] = 1'b1;          // pin 0 <- track 12
    cfgv[36 + 1*8 + 0] = 1'b1;          // pin 1 <- track 1
    cfgv[116 + 0*8 + 1] = 1'b1;         // out 0 -> track 2
    cfgv[116 + 1*8 + 2] = 1'b1;         // out 1 -> track 5
    for (int r = 0; r < 16; r++) cfgv[148 + r*4 +: 4] = 4'd15;
    cfgv[148 + 0*4 +: 4] = 4'd0;        // BLE0 in0 <- pin 0
    cfgv[148 + 4*4 +: 4] = 4'd1;        // BLE1 in0 <- pin 1
    cfgv[212 +: 17] = {1'b0, 16'h5555}; // BLE0: NOT in0, combinational
    cfgv[229 +: 17] = {1'b1, 16'hAAAA}; // BLE1: in0, registered
    w_in = '0; s_in = '0; e_in = '0; n_in = '0;
    #12 cfg_rst_n = 1; rst_n = 1;
    for (int i = 0; i < TB; i++) begin
      @(negedge clk); cfg_en = 1; cfg_in = cfgv[i];
    end
    @(negedge clk); cfg_en = 0; run = 1;
    checks++;
    if (dut.cfg !== cfgv) begin failures++; $display("FAIL configuration not loaded"); end
    q1 = 0;
    for (int c = 0; c < 200; c++) begin
      logic a, b, d;
      logic [W-1:0] ew, es, ee, en;
      @(negedge clk);
      a = 1'($urandom); b = 1'($urandom); d = 1'($urandom);
      w_in = '0; w_in[4] = a;
      e_in = '0; e_in[8] = d;
      n_in = '0; n_in[1] = b;
      #1;
      ew = '0; es = '0; ee = '0; en = '0;
      en[12] = a;                       // Wilton turn L->T
      ew[2] = ~a; ee[2] = ~a;           // BLE0 on pass-through track 2
      es[0] = d;                        // Wilton turn R->B
      es[1] = b;                        // vertical track 1 continues south
      ew[5] = q1; ee[5] = q1; es[5] = q1; en[5] = q1;   // BLE1, disjoint joint
      cmp("w_out", w_out, ew);
      cmp("e_out", e_out, ee);
      cmp("s_out", s_out, es);
      cmp("n_out", n_out, en);
      @(posedge clk);
      q1 = b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
