// tb_fpga_sb_compare: the switch-block comparison architectures: the
// array built with each of the four switch blocks (Imran, disjoint,
// universal, Wilton) at each segment length studied (S = 1, 2, 4, 8, 16),
// with W = 16, N = 4, I = 10, Fc = 0.5W. Each is a one-tile array running
// the same routed net:
//
//   a = io_w_in[0][0] arrives at the switch block on horizontal track 0,
//   which ends there for every S; the block's left-to-top switch of track 0
//   turns it onto the vertical track T that its pattern assigns
//   (0 for Imran, disjoint and Wilton, W-1 for universal);
//   a cluster pin that can reach T picks it up, BLE0 buffers it
//   combinationally and drives horizontal track 0 eastward.
//
// Expected at the edges: io_n_out[0][T] = a, io_e_out[0][0] = a, and
// io_s_out[0][T] = a where track T passes through the block; nothing else. The bit positions of the switches and the pin are found from the
// blocks' published layouts, so a wrong layout or pattern shows as a
// mismatch.
module tb_fpga_sb_compare;
  import fpga_pkg::*;

  localparam int NT = 4, NS = 5;
  localparam int TYPES [NT] = '{SB_IMRAN, SB_DISJOINT, SB_UNIVERSAL, SB_WILTON};
  localparam int SEGS  [NS] = '{1, 2, 4, 8, 16};
  localparam int W = 16, N = 4, K = 4, I = 10, FCW = 8, SELW = 4;
  localparam int LBB = N * K * SELW + N * 17;

  logic clk = 0;
  int checks = 0, failures = 0;
  bit done [NT*NS];
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar ti = 0; ti < NT; ti++) begin : g_t
    for (genvar si = 0; si < NS; si++) begin : g_s
      localparam int TY = TYPES[ti], S = SEGS[si];
      localparam int M = term_count(0, W, S);
      localparam int SBB = sb_bits(TY, W, M);
      localparam int TB = SBB + I * FCW + N * FCW + LBB;
      // vertical track reached by the left-to-top turn of track 0
      localparam int T = (TY == SB_UNIVERSAL) ? W - 1 : 0;
      // switch bit: Imran groups after the pass-through bits; the others
      // track by track, LT third of the six bits of track 0
      localparam int SWB = (TY == SB_IMRAN) ? (W - M) + WG_LT * M : 2;

      logic rst_n = 0, run = 0, cfg_rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
      logic [0:0][W-1:0] w_in, w_out, e_in, e_out, s_in, s_out, n_in, n_out;
      logic [TB-1:0] img;

      fpga_top #(.NX(1), .NY(1), .SB_TYPE(TY), .W(W), .S(S), .N(N), .K(K), .I(I), .FCW(FCW)) dut (
        .clk(clk), .rst_n(rst_n), .run(run), .cfg_rst_n(cfg_rst_n), .cfg_en(cfg_en),
        .cfg_in(cfg_in), .cfg_out(cfg_out),
        .io_w_in(w_in), .io_w_out(w_out), .io_e_in(e_in), .io_e_out(e_out),
        .io_s_in(s_in), .io_s_out(s_out), .io_n_in(n_in), .io_n_out(n_out));

      initial begin
        int pin, sel;
        img = '0;
        img[SWB] = 1'b1;
        // a pin p with switch j on track T
        pin = -1;
        for (int p = 0; p < I && pin < 0; p++)
          for (int j = 0; j < FCW; j++)
            if (pin < 0 && cb_track(p, j, W, FCW) == T) begin
              pin = p;
              img[SBB + p * FCW + j] = 1'b1;
            end
        sel = im_rank(0, pin, I, 100, 100);
        img[SBB + I * FCW + 0] = 1'b1;                             // BLE0 -> track 0
        img[SBB + I * FCW + N * FCW + 0 +: SELW] = SELW'(sel);     // row 0 <- pin
        img[SBB + I * FCW + N * FCW + N * K * SELW +: 17] = {1'b0, 16'hAAAA};
        w_in = '0; e_in = '0; s_in = '0; n_in = '0;
        #3 rst_n = 1; cfg_rst_n = 1;
        #1 rst_n = 0; cfg_rst_n = 0;
        #8 rst_n = 1; cfg_rst_n = 1;
        for (int c = 0; c < TB; c++) begin
          @(negedge clk); cfg_en = 1; cfg_in = img[c];
        end
        @(negedge clk); cfg_en = 0; run = 1;
        for (int n = 0; n < 8; n++) begin
          logic a;
          logic [0:0][W-1:0] en, ee, es;
          @(negedge clk);
          a = n[0];
          w_in[0][0] = a;
          #1;
          en = '0; en[0][T] = a;
          ee = '0; ee[0][0] = a;
          // a vertical track that does not end here is one wire through the
          // block, so it also carries a to the south edge
          es = '0; es[0][T] = (T % S != 0) ? a : 1'b0;
          checks += 4;
          if (n_out !== en) begin failures++; $display("FAIL type %0d S=%0d north %h", TY, S, n_out); end
          if (e_out !== ee) begin failures++; $display("FAIL type %0d S=%0d east %h", TY, S, e_out); end
          if (s_out !== es) begin failures++; $display("FAIL type %0d S=%0d south %h", TY, S, s_out); end
          if (w_out !== '0) begin failures++; $display("FAIL type %0d S=%0d west %h", TY, S, w_out); end
        end
        done[ti * NS + si] = 1;
      end
    end
  end

  initial begin
    #1;
    wait (done.and());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
