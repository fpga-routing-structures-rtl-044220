// fpga_tile: one tile of the island-style FPGA, the unit that is repeated to
// build the array.
//
// Geometry (x to the right, y upward). The switch block sits at the tile's
// lower-left corner. The horizontal channel piece H leaves it to the east,
// the vertical channel piece V leaves it to the north; the logic block sits
// above H and to the right of V. The logic block's I inputs come from V
// through the input connection block; its N outputs drive H through the
// output connection block. This placement of the pins is this design's
// choice; the document's tile drawing shows inputs from one channel.
//
// Routing flows (see imran_switch_block): each track carries two flows per
// direction. w_in/s_in arrive from the tile to the west/south (their H/V
// pieces) at this switch block, w_out/s_out go back to them. e_in/n_in arrive
// from the neighbouring tiles' switch blocks along this tile's own H/V
// pieces, e_out/n_out go to them. The logic-block outputs are ORed into both
// flows of H, so they reach both ends of the wire.
//
// Combinational loops: a routing wire is a net that can be reached from
// several switches, so the flow graph of the array has structural cycles
// (through the logic block's combinational path and through neighbouring
// tiles). A legal configuration (every net a tree with one driver, no
// combinational loop in the user circuit) opens all of them; the lint
// warnings about them describe the programmable fabric, not a design fault.
//
// Switch block: SB_TYPE selects the Imran block (default) or, to build the
// architectures it is compared with, a disjoint, universal or Wilton block
// (classic_switch_block); all four use the same flows and stagger.
//
// Configuration: one config_chain of TILE_BITS cells, layout LSB first (the
// switch block part, sb_bits(SB_TYPE, W, M) bits, W + 5*M for the Imran
// block, depends on the stagger class when S does not divide W):
// switch block (SB_BITS), input connection block (I*FCW), output connection
// block (N*FCW), logic block (LB_BITS). cfg_rst_n clears the configuration,
// rst_n clears the BLE flip-flops. run low holds every LUT output at 0 and
// must be kept low while the chain is shifting.
module fpga_tile
  import fpga_pkg::*;
#(
  parameter int unsigned W         = 16,
  parameter int unsigned SB_TYPE   = SB_IMRAN,
  parameter int unsigned S         = 4,
  parameter int unsigned POS       = 0,
  parameter int unsigned N         = 4,
  parameter int unsigned K         = 4,
  parameter int unsigned I         = 2 * N + 2,
  parameter int unsigned FCW       = W / 2,
  parameter int unsigned IN_PCT    = 100,
  parameter int unsigned FB_PCT    = 100,
  parameter int unsigned M         = term_count(POS, W, S),
  parameter int unsigned SB_BITS   = sb_bits(SB_TYPE, W, M),
  parameter int unsigned SELW      = $clog2(I + N + 1),
  parameter int unsigned LB_BITS   = N * K * SELW + N * ((1 << K) + 1),
  parameter int unsigned TILE_BITS = SB_BITS + I * FCW + N * FCW + LB_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  logic         cfg_rst_n,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic         cfg_out,
  input  logic [W-1:0] w_in,  s_in,  e_in,  n_in,
  output logic [W-1:0] w_out, s_out, e_out, n_out
);
  localparam int unsigned OFF_CBI = SB_BITS;
  localparam int unsigned OFF_CBO = OFF_CBI + I * FCW;
  localparam int unsigned OFF_LB  = OFF_CBO + N * FCW;

  logic [TILE_BITS-1:0] cfg;
  logic [W-1:0]         sb_r_out, sb_t_out, sb_r_in, sb_t_in;
  logic [W-1:0]         h_drv, v_val;
  logic [I-1:0]         lb_in;
  logic [N-1:0]         lb_out;

  config_chain #(.WIDTH(TILE_BITS)) u_cfg (
    .clk(clk), .rst_n(cfg_rst_n), .shift_en(cfg_en), .sin(cfg_in), .sout(cfg_out), .q(cfg)
  );

  if (SB_TYPE == SB_IMRAN) begin : g_imran
    imran_switch_block #(.W(W), .S(S), .POS(POS)) u_sb (
      .cfg  (cfg[SB_BITS-1:0]),
      .l_in (w_in),     .t_in (sb_t_in), .r_in (sb_r_in),  .b_in (s_in),
      .l_out(w_out),    .t_out(sb_t_out), .r_out(sb_r_out), .b_out(s_out)
    );
  end else begin : g_classic
    classic_switch_block #(.TYPE(SB_TYPE), .W(W), .S(S), .POS(POS)) u_sb (
      .cfg  (cfg[SB_BITS-1:0]),
      .l_in (w_in),     .t_in (sb_t_in), .r_in (sb_r_in),  .b_in (s_in),
      .l_out(w_out),    .t_out(sb_t_out), .r_out(sb_r_out), .b_out(s_out)
    );
  end

  // Horizontal piece H: logic-block outputs join both flows.
  always_comb begin
    sb_r_in = e_in | h_drv;
    e_out   = sb_r_out | h_drv;
  end

  // Vertical piece V: the full wire value feeds the input connection block.
  always_comb begin
    sb_t_in = n_in;
    n_out   = sb_t_out;
    v_val   = sb_t_out | n_in;
  end

  cb_in #(.W(W), .I(I), .FCW(FCW)) u_cbi (
    .track(v_val), .cfg(cfg[OFF_CBI +: I*FCW]), .pin(lb_in)
  );

  cb_out #(.W(W), .N(N), .FCW(FCW)) u_cbo (
    .lb_out(lb_out), .cfg(cfg[OFF_CBO +: N*FCW]), .drv(h_drv)
  );

  logic_block #(.I(I), .N(N), .K(K), .IN_PCT(IN_PCT), .FB_PCT(FB_PCT)) u_lb (
    .clk(clk), .rst_n(rst_n), .run(run), .cfg(cfg[OFF_LB +: LB_BITS]), .lb_in(lb_in), .lb_out(lb_out)
  );
endmodule
