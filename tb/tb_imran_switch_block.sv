// tb_imran_switch_block: checks the switch block for several channel widths,
// segment lengths and stagger positions (W=16/S=4 at all four positions,
// W=16/S=1 which is a plain Wilton block, W=8/S=2, W=16/S=8, W=16/S=16, and W=30 and W=73 with S=4,
// channel widths that S does not divide).
//  * Random configuration and random arriving flows are compared with a
//    reference built from the pattern definitions: pass-through tracks
//    continue straight and are joined to the crossing track of the same
//    number by one switch (disjoint); terminating tracks are joined by the
//    six Wilton switch groups, written here from the point of view of the
//    side each connection leaves from.
//  * Flexibility: with every switch on, a signal arriving on any wire end
//    must reach exactly Fs = 3 other wire ends.
module tb_imran_switch_block;
  localparam int NV = 11;
  localparam int WV[NV]   = '{16, 16, 16, 16, 16, 8, 16, 16, 30, 30, 73};
  localparam int SV[NV]   = '{4, 4, 4, 4, 1, 2, 8, 16, 4, 4, 4};
  localparam int PV[NV]   = '{0, 1, 2, 3, 0, 1, 3, 5, 1, 3, 0};

  function automatic int n_term(int w, int s, int pos);
    int n;
    n = 0;
    for (int t = 0; t < w; t++) if ((pos + t) % s == 0) n++;
    return n;
  endfunction

  int checks = 0, failures = 0;
  bit done [NV];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar v = 0; v < NV; v++) begin : g_v
    localparam int W = WV[v], S = SV[v], POS = PV[v], M = n_term(W, S, POS);
    localparam int NB = (W - M) + 6 * M;
    logic [NB-1:0] cfg;
    logic [W-1:0] in_f [4];
    logic [W-1:0] out_f [4];

    imran_switch_block #(.W(W), .S(S), .POS(POS)) dut (
      .cfg(cfg),
      .l_in(in_f[0]), .t_in(in_f[1]), .r_in(in_f[2]), .b_in(in_f[3]),
      .l_out(out_f[0]), .t_out(out_f[1]), .r_out(out_f[2]), .b_out(out_f[3]));

    // sides: 0 = L, 1 = T, 2 = R, 3 = B
    function automatic bit term(int t);
      return ((POS + t) % S) == 0;
    endfunction
    function automatic int trk(int j);   // local index -> track
      for (int t = 0; t < W; t++)
        if (term(t) && (t / S) == j) return t;
      return -1;
    endfunction

    task automatic reference(output logic [W-1:0] e [4]);
      int pr;
      for (int s = 0; s < 4; s++) e[s] = '0;
      pr = 0;
      for (int t = 0; t < W; t++) begin
        if (!term(t)) begin
          logic sw;
          sw = cfg[pr];
          pr++;
          e[0][t] = in_f[2][t] | (sw & (in_f[1][t] | in_f[3][t]));
          e[2][t] = in_f[0][t] | (sw & (in_f[1][t] | in_f[3][t]));
          e[1][t] = in_f[3][t] | (sw & (in_f[0][t] | in_f[2][t]));
          e[3][t] = in_f[1][t] | (sw & (in_f[0][t] | in_f[2][t]));
        end
      end
      for (int j = 0; j < M; j++) begin
        // {from side, to side, to-local index, group}
        int conn [6][4];
        conn[0] = '{0, 2, j,                  0};   // L -> R
        conn[1] = '{1, 3, j,                  1};   // T -> B
        conn[2] = '{0, 1, (M - j) % M,        2};   // L -> T
        conn[3] = '{0, 3, (M + j - 1) % M,    3};   // L -> B
        conn[4] = '{2, 1, (M + j - 1) % M,    4};   // R -> T
        conn[5] = '{2, 3, (2*M - 2 - j) % M,  5};   // R -> B
        for (int k = 0; k < 6; k++) begin
          int a, b, ta, tb;
          logic sw;
          a = conn[k][0]; b = conn[k][1];
          ta = trk(j); tb = trk(conn[k][2]);
          sw = cfg[(W - M) + conn[k][3] * M + j];
          if (sw) begin
            e[b][tb] |= in_f[a][ta];
            e[a][ta] |= in_f[b][tb];
          end
        end
      end
    endtask

    initial begin
      logic [W-1:0] e [4];
      #1;
      for (int it = 0; it < 300; it++) begin
        for (int b = 0; b < NB; b++) cfg[b] = 1'($urandom);
        for (int s = 0; s < 4; s++) in_f[s] = W'($urandom);
        #1;
        reference(e);
        for (int s = 0; s < 4; s++) begin
          checks++;
          if (out_f[s] !== e[s]) begin
            failures++;
            $display("FAIL v=%0d side %0d out=%h exp=%h", v, s, out_f[s], e[s]);
          end
        end
      end
      // Fs = 3 with every switch on
      cfg = '1;
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < W; t++) begin
          int cnt;
          for (int u = 0; u < 4; u++) in_f[u] = '0;
          in_f[s][t] = 1'b1;
          #1;
          cnt = 0;
          for (int u = 0; u < 4; u++) cnt += $countones(out_f[u]);
          checks++;
          if (cnt != 3) begin
            failures++;
            $display("FAIL v=%0d side %0d track %0d reaches %0d wire ends", v, s, t, cnt);
          end
        end
      done[v] = 1;
    end
  end

  initial begin
    for (int v = 0; v < NV; v++) done[v] = 0;
    #2;
    wait (done.and());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
