// tb_classic_switch_block: checks the disjoint, universal and Wilton
// switch blocks in segmented channels.
//
// For each variant (pattern, W, S, stagger class) random configurations
// and random wire inputs are applied and every output is compared with a
// reference model that applies explicit (side, track) <-> (side, track)
// switches to wires, where a pass-through wire is a single net on both
// sides of the block. Also checked:
//   * the number of configuration bits (6 per ending track, 1 or 4 per
//     pass-through track),
//   * Fs = 3: every wire end of an ending track reaches exactly three others
//     when every switch is on,
//   * the disjoint domains: with every switch on, a signal on track t
//     reaches only track t,
//   * at S = 1 (every track ends) the Wilton block equals the Imran block
//     bit for bit once the configuration bits are reordered.
module tb_classic_switch_block;
  import fpga_pkg::*;

  localparam int NV = 10;
  localparam int V_TY  [NV] = '{SB_DISJOINT, SB_DISJOINT, SB_UNIVERSAL, SB_WILTON, SB_WILTON,
                                SB_UNIVERSAL, SB_DISJOINT, SB_UNIVERSAL, SB_WILTON, SB_UNIVERSAL};
  localparam int V_W   [NV] = '{16, 16, 16, 16, 30, 8, 16, 16, 16, 30};
  localparam int V_S   [NV] = '{4, 4, 4, 4, 4, 2, 1, 16, 1, 4};
  localparam int V_POS [NV] = '{0, 3, 1, 2, 1, 1, 0, 5, 0, 3};

  int checks = 0, failures = 0;
  bit done [NV+1];

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar v = 0; v < NV; v++) begin : g_v
    localparam int TY = V_TY[v], W = V_W[v], S = V_S[v], POS = V_POS[v];
    localparam int M  = term_count(POS, W, S);
    localparam int NB = 6 * M + (TY == SB_DISJOINT ? 1 : 4) * (W - M);

    logic [NB-1:0] cfg;
    logic [W-1:0] li, ti, ri, bi, lo, to, ro, bo;

    classic_switch_block #(.TYPE(TY), .W(W), .S(S), .POS(POS)) dut (
      .cfg(cfg), .l_in(li), .t_in(ti), .r_in(ri), .b_in(bi),
      .l_out(lo), .t_out(to), .r_out(ro), .b_out(bo));

    function automatic bit ends(int t);
      return (POS + t) % S == 0;
    endfunction

    // far track of a turn; sides 0 L, 1 T, 2 R, 3 B
    function automatic int far(int sa, int sb, int t);
      if (TY == SB_DISJOINT) return t;
      if (TY == SB_UNIVERSAL) begin
        if ((sa == 0 && sb == 1) || (sa == 2 && sb == 3)) return W - 1 - t;
        return t;
      end
      if (sa == 0 && sb == 1) return (W - t) % W;
      if (sa == 0 && sb == 3) return (t + W - 1) % W;
      if (sa == 2 && sb == 1) return (t + W - 1) % W;
      return (2 * W - 2 - t) % W;
    endfunction

    // reference: out[side][t] from the switch list
    task automatic model(input logic [NB-1:0] c, input logic [3:0][W-1:0] in_,
                         output logic [3:0][W-1:0] out_);
      int bitn;
      int sa [6], sb [6];
      logic [3:0][W-1:0] net_in;
      sa = '{0, 1, 0, 0, 2, 2};
      sb = '{2, 3, 1, 3, 1, 3};
      out_ = '0;
      for (int t = 0; t < W; t++)
        for (int s = 0; s < 4; s++)
          net_in[s][t] = ends(t) ? in_[s][t] : (in_[s % 2][t] | in_[s % 2 + 2][t]);
      bitn = 0;
      for (int t = 0; t < W; t++) begin
        if (ends(t)) begin
          for (int g = 0; g < 6; g++) begin
            int tb;
            tb = g < 2 ? t : far(sa[g], sb[g], t);
            if (c[bitn]) begin
              out_[sa[g]][t]  |= net_in[sb[g]][tb];
              out_[sb[g]][tb] |= net_in[sa[g]][t];
              if (!ends(tb)) out_[(sb[g] + 2) % 4][tb] |= net_in[sa[g]][t];
            end
            bitn++;
          end
        end else begin
          for (int g = 2; g < 6; g++) begin
            int tb;
            tb = far(sa[g], sb[g], t);
            if (c[bitn]) begin
              // the whole horizontal wire t meets the wire at (sb, tb)
              out_[0][t] |= net_in[sb[g]][tb];
              out_[2][t] |= net_in[sb[g]][tb];
              out_[sb[g]][tb] |= net_in[0][t];
              if (!ends(tb)) out_[(sb[g] + 2) % 4][tb] |= net_in[0][t];
            end
            if (TY != SB_DISJOINT) bitn++;
          end
          if (TY == SB_DISJOINT) bitn++;
        end
      end
      for (int t = 0; t < W; t++)
        if (!ends(t))
          for (int s = 0; s < 4; s++) out_[s][t] |= in_[(s + 2) % 4][t];
    endtask

    initial begin
      logic [3:0][W-1:0] in_, exp_, got;
      #1;
      // configuration size
      checks++;
      if ($bits(cfg) != sb_bits(TY, W, M)) begin
        failures++; $display("FAIL v=%0d bits %0d", v, $bits(cfg));
      end
      // random configurations and inputs against the model
      for (int n = 0; n < 300; n++) begin
        for (int b = 0; b < NB; b++) cfg[b] = ($urandom % 4) == 0;
        {li, ti, ri, bi} = {$urandom, $urandom, $urandom, $urandom, $urandom};
        if (n % 3 == 0) begin
          // one input wire end only, to see each path on its own
          int s, t;
          s = $urandom % 4; t = $urandom % W;
          {li, ti, ri, bi} = '0;
          in_ = '0; in_[s][t] = 1'b1;
          {bi, ri, ti, li} = in_;
        end
        #1;
        in_ = {bi, ri, ti, li};
        model(cfg, in_, exp_);
        got = {bo, ro, to, lo};
        checks++;
        if (got !== exp_) begin
          failures++;
          if (failures < 10) $display("FAIL v=%0d ty=%0d W=%0d S=%0d POS=%0d got %h exp %h",
                                      v, TY, W, S, POS, got, exp_);
        end
      end
      // Fs = 3 and disjoint domains, all switches on
      cfg = '1;
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < W; t++) begin
          int reach;
          in_ = '0; in_[s][t] = 1'b1;
          {bi, ri, ti, li} = in_;
          #1;
          got = {bo, ro, to, lo};
          if (ends(t)) begin
            // count wires: an ending track's four ends separately, a
            // pass-through track's horizontal and vertical wire once each
            reach = 0;
            for (int t2 = 0; t2 < W; t2++)
              if (ends(t2)) begin
                for (int s2 = 0; s2 < 4; s2++) if (got[s2][t2]) reach++;
              end else begin
                if (got[0][t2] || got[2][t2]) reach++;
                if (got[1][t2] || got[3][t2]) reach++;
              end
            checks++;
            if (reach != 3) begin
              failures++; $display("FAIL v=%0d Fs: side %0d track %0d reaches %0d", v, s, t, reach);
            end
          end
          if (TY == SB_DISJOINT) begin
            for (int s2 = 0; s2 < 4; s2++)
              for (int t2 = 0; t2 < W; t2++)
                if (t2 != t) begin
                  checks++;
                  if (got[s2][t2]) begin failures++; $display("FAIL v=%0d domain %0d -> %0d", v, t, t2); end
                end
          end
        end
      done[v] = 1;
    end
  end

  // Wilton at S = 1 against the Imran block (which is all-Wilton there)
  begin : g_cmp
    localparam int W = 16;
    logic [6*W-1:0] ccfg, icfg;
    logic [W-1:0] li, ti, ri, bi, clo, cto, cro, cbo, ilo, ito, iro, ibo;
    classic_switch_block #(.TYPE(SB_WILTON), .W(W), .S(1), .POS(0)) u_c (
      .cfg(ccfg), .l_in(li), .t_in(ti), .r_in(ri), .b_in(bi),
      .l_out(clo), .t_out(cto), .r_out(cro), .b_out(cbo));
    imran_switch_block #(.W(W), .S(1), .POS(0)) u_i (
      .cfg(icfg), .l_in(li), .t_in(ti), .r_in(ri), .b_in(bi),
      .l_out(ilo), .t_out(ito), .r_out(iro), .b_out(ibo));
    initial begin
      #2;
      for (int n = 0; n < 500; n++) begin
        ccfg = {$urandom, $urandom, $urandom};
        for (int t = 0; t < W; t++)
          for (int g = 0; g < 6; g++) icfg[g * W + t] = ccfg[t * 6 + g];
        {li, ti, ri, bi} = {$urandom, $urandom};
        #1;
        checks++;
        if ({clo, cto, cro, cbo} !== {ilo, ito, iro, ibo}) begin
          failures++;
          if (failures < 10) $display("FAIL Wilton vs Imran at S=1");
        end
      end
      done[NV] = 1;
    end
  end

  initial begin
    wait (done.and());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
