// tb_interconnect_matrix: checks three matrix populations side by side
// (100/100, 50/100, 25/25) with I = 10 cluster inputs, N = 4 BLEs, K = 4.
//  * Selection: random selects and sources are compared with a reference that
//    builds each row's candidate list from the population rule.
//  * Population: for every source the number of BLE inputs it can reach is
//    measured on the block and must equal A% (inputs) or B% (feedbacks) of
//    the N*K BLE inputs, which is how the document defines an A/B pattern.
module tb_interconnect_matrix;
  localparam int unsigned I = 10, N = 4, K = 4, R = N * K;
  localparam int unsigned SELW = $clog2(I + N + 1);
  localparam int unsigned NV = 3;
  localparam int unsigned INP[NV] = '{100, 50, 25};
  localparam int unsigned FBP[NV] = '{100, 100, 25};

  logic [I-1:0] lb_in;
  logic [N-1:0] fb;
  logic [R*SELW-1:0] cfg [NV];
  logic [R-1:0] out [NV];
  int checks = 0, failures = 0;

  for (genvar v = 0; v < NV; v++) begin : g_dut
    interconnect_matrix #(.I(I), .N(N), .K(K), .IN_PCT(INP[v]), .FB_PCT(FBP[v])) dut (
      .lb_in(lb_in), .fb(fb), .cfg(cfg[v]), .ble_in(out[v]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: candidate list of row r = inputs c with c%pi == r%pi, then
  // feedbacks f with f%pf == r%pf; select n picks the n-th candidate.
  function automatic logic ref_bit(int unsigned v, int unsigned r, logic [SELW-1:0] sel,
                                   logic [I-1:0] li, logic [N-1:0] f);
    int unsigned pi, pf, n;
    pi = 100 / INP[v];
    pf = 100 / FBP[v];
    n = 0;
    for (int unsigned c = 0; c < I; c++)
      if (c % pi == r % pi) begin
        if (n == sel) return li[c];
        n++;
      end
    for (int unsigned c = 0; c < N; c++)
      if (c % pf == r % pf) begin
        if (n == sel) return f[c];
        n++;
      end
    return 1'b0;
  endfunction

  initial begin
    // random selection checks
    for (int it = 0; it < 400; it++) begin
      lb_in = I'($urandom);
      fb    = N'($urandom);
      for (int v = 0; v < NV; v++)
        for (int r = 0; r < R; r++) cfg[v][r*SELW +: SELW] = SELW'($urandom);
      #1;
      for (int v = 0; v < NV; v++)
        for (int r = 0; r < R; r++) begin
          checks++;
          if (out[v][r] !== ref_bit(v, r, cfg[v][r*SELW +: SELW], lb_in, fb)) begin
            failures++;
            $display("FAIL v=%0d row=%0d sel=%0d", v, r, cfg[v][r*SELW +: SELW]);
          end
        end
    end
    // population: how many BLE inputs each source reaches
    for (int v = 0; v < NV; v++) begin
      for (int c = 0; c < I + N; c++) begin
        logic [R-1:0] reach;
        int cnt, want;
        reach = '0;
        {fb, lb_in} = (I+N)'(1) << c;
        for (int s = 0; s < (1 << SELW); s++) begin
          for (int r = 0; r < R; r++) cfg[v][r*SELW +: SELW] = SELW'(s);
          #1;
          reach |= out[v];
        end
        cnt = $countones(reach);
        want = (c < I) ? R * INP[v] / 100 : R * FBP[v] / 100;
        checks++;
        if (cnt != want) begin
          failures++;
          $display("FAIL population v=%0d src=%0d reaches %0d of %0d BLE inputs, want %0d", v, c, cnt, R, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
