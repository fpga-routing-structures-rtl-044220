// tb_fpga_arch_sweep: builds the architectures whose place-and-route results
// are reported for this fabric (segment length 4, K = 4, I = 2N+2,
// Fc = 0.5W) as single-tile arrays, each with the channel width measured for it,
// and runs the same routed circuit through every one of them:
//
//    N   W   matrix        N   W   matrix        N   W   matrix
//    4  30   100/100       8  41   100/100      12  61   25/100
//    4  35    50/100       8  48    50/100      12  65   50/50
//    4  16   100/50       12  51   100/100      12  73   25/25
//                         12  60    50/100      16  57   100/100
//                                               16  68    50/100
//
// Circuit: a = io_w_in[0][0] enters on a wire end, is
// turned north by a Wilton switch onto vertical track 0, and enters the
// cluster on pin 0. BLE0 is registered: q <= a ^ fb, where fb is BLE0's own
// output fed back, or, where the depopulated matrix cannot feed BLE0 back to
// its own second input, the output of a combinational buffer BLE f that
// copies BLE0. q leaves on horizontal track 0 and leaves through the east edge of the tile.
// The matrix selects are found the way a packer must find them for a
// depopulated matrix: from the connection rule, choosing a source that is
// actually connected to the row. Edge outputs are compared every cycle.
module tb_fpga_arch_sweep;
  localparam int NV = 12;
  localparam int NV_N  [NV] = '{4,   4,  4,  8,  8,  12, 12, 12, 12, 12, 16, 16};
  localparam int NV_W  [NV] = '{30, 35, 16, 41, 48, 51, 60, 61, 65, 73, 57, 68};
  localparam int NV_IN [NV] = '{100, 50, 100, 100, 50, 100, 50, 25, 50, 25, 100, 50};
  localparam int NV_FB [NV] = '{100, 100, 50, 100, 100, 100, 100, 100, 50, 25, 100, 100};
  localparam int S = 4, K = 4;

  logic clk = 0;
  int checks = 0, failures = 0;
  bit done [NV];
  int toggles [NV];
  int via_other_ble = 0;

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int n_term(int w, int pos);
    int n;
    n = 0;
    for (int t = 0; t < w; t++) if ((pos + t) % S == 0) n++;
    return n;
  endfunction

  function automatic int clog2(int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  for (genvar v = 0; v < NV; v++) begin : g_arch
    localparam int N = NV_N[v], W = NV_W[v], I = 2 * N + 2, FCW = W / 2;
    localparam int PI = 100 / NV_IN[v], PF = 100 / NV_FB[v];
    localparam int SELW = clog2(I + N + 1);
    localparam int LBB = N * K * SELW + N * ((1 << K) + 1);
    localparam int M0 = n_term(W, 0);
    localparam int SBB0 = W + 5 * M0;
    localparam int TB0 = SBB0 + I * FCW + N * FCW + LBB;

    logic rst_n = 0, run = 0, cfg_rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
    logic [0:0][W-1:0] w_in, w_out, e_in, e_out, s_in, s_out, n_in, n_out;
    logic [TB0-1:0] t0;
    logic stream [$];

    fpga_top #(.NX(1), .NY(1), .W(W), .S(S), .N(N), .K(K), .I(I), .FCW(FCW),
               .IN_PCT(NV_IN[v]), .FB_PCT(NV_FB[v])) dut (
      .clk(clk), .rst_n(rst_n), .run(run), .cfg_rst_n(cfg_rst_n), .cfg_en(cfg_en),
      .cfg_in(cfg_in), .cfg_out(cfg_out),
      .io_w_in(w_in), .io_w_out(w_out), .io_e_in(e_in), .io_e_out(e_out),
      .io_s_in(s_in), .io_s_out(s_out), .io_n_in(n_in), .io_n_out(n_out));

    // rank of source c (inputs 0..I-1, then feedbacks) in row r's list
    function automatic int rank(int r, int c);
      int n;
      n = 0;
      for (int u = 0; u < c; u++)
        if (u < I ? (u % PI == r % PI) : ((u - I) % PF == r % PF)) n++;
      return n;
    endfunction
    function automatic bit conn(int r, int c);
      return c < I ? (c % PI == r % PI) : ((c - I) % PF == r % PF);
    endfunction

    initial begin
      int f, lb, q;
      t0 = '0;
      // switch block (0,0): Wilton L-T, local 0 (left track 0 <-> top track 0)
      t0[(W - M0) + 2 * M0 + 0] = 1'b1;
      t0[SBB0 + 0] = 1'b1;                      // pin 0 <- track 0
      t0[SBB0 + I * FCW + 0] = 1'b1;            // output 0 -> track 0
      lb = SBB0 + I * FCW + N * FCW;
      // BLE0 in0 <- pin 0, in1 <- feedback f (first feedback row 1 can see)
      f = 0;
      while (!conn(1, I + f)) f++;
      t0[lb + 0 * SELW +: SELW] = SELW'(rank(0, 0));
      t0[lb + 1 * SELW +: SELW] = SELW'(rank(1, I + f));
      t0[lb + N * K * SELW + 0 +: 17] = {1'b1, 16'h6666};
      if (f != 0) begin
        // BLE f copies BLE0: its in0 (row f*K) <- feedback 0
        if (!conn(f * K, I)) begin failures++; $display("FAIL v=%0d no route for the copy", v); end
        t0[lb + (f * K) * SELW +: SELW] = SELW'(rank(f * K, I));
        t0[lb + N * K * SELW + f * 17 +: 17] = {1'b0, 16'hAAAA};
        via_other_ble++;
      end
      for (int c = 0; c < TB0; c++) stream.push_back(t0[c]);
      w_in = '0; e_in = '0; s_in = '0; n_in = '0;
      #3 rst_n = 1; cfg_rst_n = 1;
      #1 rst_n = 0; cfg_rst_n = 0;
      #8 rst_n = 1; cfg_rst_n = 1;
      foreach (stream[i]) begin
        @(negedge clk); cfg_en = 1; cfg_in = stream[i];
      end
      @(negedge clk); cfg_en = 0; run = 1;
      q = 0;
      toggles[v] = 0;
      for (int c = 0; c < 60; c++) begin
        logic a;
        logic [0:0][W-1:0] ee, en;
        @(negedge clk);
        a = 1'($urandom);
        w_in[0][0] = a;
        #1;
        ee = '0; en = '0;
        ee[0][0] = 1'(q);
        en[0][0] = a;
        checks += 4;
        if (e_out !== ee) begin failures++; $display("FAIL N=%0d W=%0d %0d/%0d east", N, W, NV_IN[v], NV_FB[v]); end
        if (n_out !== en) begin failures++; $display("FAIL N=%0d W=%0d %0d/%0d north", N, W, NV_IN[v], NV_FB[v]); end
        if (w_out !== '0) begin failures++; $display("FAIL N=%0d W=%0d west", N, W); end
        if (s_out !== '0) begin failures++; $display("FAIL N=%0d W=%0d south", N, W); end
        @(posedge clk);
        if (a) toggles[v]++;
        q = q ^ int'(a);
      end
      checks++;
      if (toggles[v] == 0) begin failures++; $display("FAIL v=%0d never toggled", v); end
      $display("N=%0d W=%0d %0d/%0d: tile 0 holds %0d configuration bits, %0d toggles",
               N, W, NV_IN[v], NV_FB[v], TB0, toggles[v]);
      done[v] = 1;
    end
  end

  initial begin
    #2;
    wait (done.and());
    checks++;
    if (via_other_ble == 0) begin failures++; $display("FAIL feedback through another BLE never needed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
