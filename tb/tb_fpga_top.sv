// tb_fpga_top: end-to-end test of the 4 x 4 array at its default parameters
// (W = 16 tracks of length 4, N = 4, K = 4, I = 10, Fc = 0.5W, 100/100).
//
// It shifts a complete bitstream through the configuration chain, then runs
// a routed two-cluster circuit:
//   a = io_w_in[1][7] enters switch block (0,1) on a wire end; a Wilton
//       left->top switch turns it onto vertical track 15, which carries it
//       into cluster (0,1) and on to the north edge (io_n_out[0][15]).
//   cluster (0,1), BLE0, registered: q <= q ^ a  (uses its own feedback).
//   q drives horizontal track 0, a wire that passes through switch blocks
//       (0,1), (1,1), (2,1): it reaches the west edge directly; at (1,1) the
//       disjoint switch joins it to vertical track 0, which carries q into
//       cluster (1,1) and down to the south edge (io_s_out[1][0]); at (3,1)
//       the wire ends and a Wilton straight switch continues it to the east
//       edge (io_e_out[1][0]).
//   b = io_n_in[1][2] runs down vertical track 2 through two switch blocks
//       into cluster (1,1).
//   cluster (1,1), BLE0, combinational: y = q ^ b, driven on horizontal
//       track 4: it reaches the west edge (io_w_out[1][4]) and, through a
//       Wilton left->top turn at (3,1), the north edge (io_n_out[3][12]).
// Every edge output is compared each cycle with a model of this circuit
// (all other edge outputs must stay 0). Each mechanism (chain load and
// read-back, run hold, registered and combinational BLE, feedback, the three
// switch kinds, pass-through wires) is counted and must occur.
module tb_fpga_top;
  localparam int unsigned NX = 4, NY = 4, W = 16, TB = 280, NT = NX * NY;
  localparam int unsigned PB = 12;             // disjoint bits per switch block (W - W/S)
  localparam int unsigned CBI = 36, CBO = 116, LB = 148, BLE0 = LB + 64;

  logic clk = 0, rst_n = 0, run = 0, cfg_rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [NY-1:0][W-1:0] io_w_in, io_w_out, io_e_in, io_e_out;
  logic [NX-1:0][W-1:0] io_s_in, io_s_out, io_n_in, io_n_out;
  logic [TB-1:0] cfgv [NT];
  int checks = 0, failures = 0;
  int n_load = 0, n_readback = 0, n_hold = 0, n_reg_toggle = 0, n_comb_one = 0;
  int n_wilton_turn = 0, n_wilton_straight = 0, n_disjoint = 0, n_pass = 0;

  fpga_top dut (
    .clk(clk), .rst_n(rst_n), .run(run), .cfg_rst_n(cfg_rst_n), .cfg_en(cfg_en),
    .cfg_in(cfg_in), .cfg_out(cfg_out),
    .io_w_in(io_w_in), .io_w_out(io_w_out), .io_e_in(io_e_in), .io_e_out(io_e_out),
    .io_s_in(io_s_in), .io_s_out(io_s_out), .io_n_in(io_n_in), .io_n_out(io_n_out));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tix(int x, int y);
    return y * NX + x;
  endfunction

  task automatic build_bitstream();
    for (int k = 0; k < NT; k++) begin
      cfgv[k] = '0;
      for (int r = 0; r < 16; r++) cfgv[k][LB + r*4 +: 4] = 4'd15;   // matrix rows unused
    end
    // switch block (0,1), stagger 1: wire ends are tracks 3,7,11,15
    cfgv[tix(0,1)][PB + 2*4 + 1] = 1'b1;       // Wilton L-T, local 1: L7 <-> T15
    // cluster (0,1)
    cfgv[tix(0,1)][CBI + 1*8 + 7] = 1'b1;      // pin 1 <- track 15
    cfgv[tix(0,1)][LB + 0*4 +: 4] = 4'd1;      // BLE0 in0 <- pin 1
    cfgv[tix(0,1)][LB + 1*4 +: 4] = 4'd10;     // BLE0 in1 <- feedback 0
    cfgv[tix(0,1)][BLE0 +: 17] = {1'b1, 16'h6666};  // XOR, registered
    cfgv[tix(0,1)][CBO + 0*8 + 0] = 1'b1;      // out 0 -> track 0
    // switch block (1,1), stagger 2: track 0 is the first pass-through track
    cfgv[tix(1,1)][0] = 1'b1;                  // disjoint H0 <-> V0
    // cluster (1,1)
    cfgv[tix(1,1)][CBI + 0*8 + 0] = 1'b1;      // pin 0 <- track 0
    cfgv[tix(1,1)][CBI + 2*8 + 0] = 1'b1;      // pin 2 <- track 2
    cfgv[tix(1,1)][LB + 0*4 +: 4] = 4'd0;      // BLE0 in0 <- pin 0
    cfgv[tix(1,1)][LB + 1*4 +: 4] = 4'd2;      // BLE0 in1 <- pin 2
    cfgv[tix(1,1)][BLE0 +: 17] = {1'b0, 16'h6666};  // XOR, combinational
    cfgv[tix(1,1)][CBO + 0*8 + 2] = 1'b1;      // out 0 -> track 4
    // switch block (3,1), stagger 0: wire ends are tracks 0,4,8,12
    cfgv[tix(3,1)][PB + 0*4 + 0] = 1'b1;       // Wilton L-R, local 0: L0 <-> R0
    cfgv[tix(3,1)][PB + 2*4 + 1] = 1'b1;       // Wilton L-T, local 1: L4 <-> T12
  endtask

  // The bit for the last tile's cell 0 goes first.
  function automatic logic stream_bit(int i);
    int k, c;
    k = NT - 1 - i / TB;
    c = i % TB;
    return cfgv[k][c];
  endfunction

  task automatic expect_io(logic a, logic q, logic y);
    logic [NY-1:0][W-1:0] ew, ee;
    logic [NX-1:0][W-1:0] es, en;
    ew = '0; ee = '0; es = '0; en = '0;
    ew[1][0] = q;  ew[1][4] = y;
    ee[1][0] = q;
    es[1][0] = q;
    en[0][15] = a; en[3][12] = y;
    checks += 4;
    if (io_w_out !== ew) begin failures++; $display("FAIL west  %h exp %h", io_w_out, ew); end
    if (io_e_out !== ee) begin failures++; $display("FAIL east  %h exp %h", io_e_out, ee); end
    if (io_s_out !== es) begin failures++; $display("FAIL south %h exp %h", io_s_out, es); end
    if (io_n_out !== en) begin failures++; $display("FAIL north %h exp %h", io_n_out, en); end
  endtask

  initial begin
    logic q;
    io_w_in = '0; io_e_in = '0; io_s_in = '0; io_n_in = '0;
    build_bitstream();
    #3 cfg_rst_n = 1; rst_n = 1;
    #1 cfg_rst_n = 0; rst_n = 0;
    #8 cfg_rst_n = 1; rst_n = 1;
    // load
    for (int i = 0; i < NT * TB; i++) begin
      @(negedge clk); cfg_en = 1; cfg_in = stream_bit(i);
      @(posedge clk); n_load++;
    end
    @(negedge clk); cfg_en = 0;
    // while run is low every LUT is held at 0: only the input a, routed
    // through switches alone, may show up
    io_w_in[1][7] = 1'b1;
    #1;
    expect_io(1'b1, 1'b0, 1'b0);
    n_hold++;
    io_w_in[1][7] = 1'b0;
    run = 1;
    q = 0;
    for (int c = 0; c < 400; c++) begin
      logic a, b, y;
      @(negedge clk);
      a = 1'($urandom); b = 1'($urandom);
      io_w_in[1][7] = a;
      io_n_in[1][2] = b;
      #1;
      y = q ^ b;
      expect_io(a, q, y);
      if (a)  n_wilton_turn++;
      if (y)  n_comb_one++;
      if (q) begin n_wilton_straight++; n_disjoint++; n_pass++; end
      @(posedge clk);
      if (a) n_reg_toggle++;
      q = q ^ a;
    end
    // read the configuration back out of the chain (run low again)
    @(negedge clk); run = 0;
    for (int i = 0; i < NT * TB; i++) begin
      checks++;
      if (cfg_out !== stream_bit(i)) begin
        failures++;
        if (failures < 10) $display("FAIL readback bit %0d", i);
      end else n_readback++;
      @(negedge clk); cfg_en = 1; cfg_in = 1'b0;
      @(posedge clk); #1 cfg_en = 0;
    end
    $display("mechanisms: load=%0d readback=%0d run_hold=%0d reg_toggle=%0d comb_one=%0d", n_load, n_readback,
             n_hold, n_reg_toggle, n_comb_one);
    $display("            wilton_turn=%0d wilton_straight=%0d disjoint=%0d pass_through=%0d",
             n_wilton_turn, n_wilton_straight, n_disjoint, n_pass);
    checks += 9;
    if (n_load != NT*TB)      begin failures++; $display("FAIL load count"); end
    if (n_readback == 0)      begin failures++; $display("FAIL no readback"); end
    if (n_hold == 0)          failures++;
    if (n_reg_toggle == 0)    begin failures++; $display("FAIL registered BLE never toggled"); end
    if (n_comb_one == 0)      begin failures++; $display("FAIL combinational BLE never 1"); end
    if (n_wilton_turn == 0)   begin failures++; $display("FAIL no Wilton turn"); end
    if (n_wilton_straight == 0) begin failures++; $display("FAIL no Wilton straight"); end
    if (n_disjoint == 0)      begin failures++; $display("FAIL no disjoint switch use"); end
    if (n_pass == 0)          begin failures++; $display("FAIL no pass-through use"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
