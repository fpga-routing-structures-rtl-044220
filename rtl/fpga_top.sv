// fpga_top: island-style FPGA with segmented routing and the Imran switch
// block: an NX x NY array of fpga_tile, each holding one logic block of N
// BLEs, its connection blocks, one horizontal and one vertical channel piece
// and one switch block.
//
// Routing: every channel has W tracks, all of length S tiles, staggered so
// that at each switch block W/S tracks end (rounded up or down by stagger
// class when S does not divide W) and the rest pass through. Tile (x, y)
// has stagger class POS = (x + y) % S. The channel ends at the
// array edge are brought out as ports (the io_<edge>_in flow enters the
// fabric on that wire end, io_<edge>_out is the value the fabric puts on it),
// standing in for I/O blocks, which are not modelled.
//
// Defaults follow the document's evaluated architecture: W = 16, S = 4
// (the switch block example), N = 4 BLEs of K = 4 inputs, I = 2N+2 = 10,
// Fc = 0.5W, fully connected (100/100) interconnect matrix. The 4 x 4 array
// size is this design's choice.
//
// Configuration: one serial chain through all tiles in the order
// (0,0), (1,0), ... (NX-1,0), (0,1), ... The bit that is to end up in the last
// tile's cell 0 is shifted in first; loading the whole array takes one
// cycle with cfg_en high per cell, NX*NY*TILE_BITS cycles when every tile
// has the same size (always so when S divides W). Each tile's layout is documented
// in fpga_tile. User flip-flops are cleared by rst_n, the configuration by
// cfg_rst_n. The user circuit runs on clk once cfg_en is low and run is
// high; run must stay low while the configuration is shifting.
//
// SB_TYPE picks the switch block of every tile: the Imran block (default)
// or the disjoint, universal or Wilton block it is compared with.
//
// The fabric's routing graph contains structural combinational cycles; a
// legal configuration breaks every one of them (see fpga_tile).
module fpga_top
  import fpga_pkg::*;
#(
  parameter int unsigned NX     = 4,
  parameter int unsigned NY     = 4,
  parameter int unsigned W      = 16,
  parameter int unsigned SB_TYPE = SB_IMRAN,
  parameter int unsigned S      = 4,
  parameter int unsigned N      = 4,
  parameter int unsigned K      = 4,
  parameter int unsigned I      = 2 * N + 2,
  parameter int unsigned FCW    = W / 2,
  parameter int unsigned IN_PCT = 100,
  parameter int unsigned FB_PCT = 100
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic                 cfg_rst_n,
  input  logic                 cfg_en,
  input  logic                 cfg_in,
  output logic                 cfg_out,
  input  logic [NY-1:0][W-1:0] io_w_in,
  output logic [NY-1:0][W-1:0] io_w_out,
  input  logic [NY-1:0][W-1:0] io_e_in,
  output logic [NY-1:0][W-1:0] io_e_out,
  input  logic [NX-1:0][W-1:0] io_s_in,
  output logic [NX-1:0][W-1:0] io_s_out,
  input  logic [NX-1:0][W-1:0] io_n_in,
  output logic [NX-1:0][W-1:0] io_n_out
);
  logic [W-1:0] w_in [NX][NY], w_out [NX][NY], e_in [NX][NY], e_out [NX][NY];
  logic [W-1:0] s_in [NX][NY], s_out [NX][NY], n_in [NX][NY], n_out [NX][NY];
  logic         chain [NX*NY+1];

  always_comb chain[0] = cfg_in;
  always_comb cfg_out  = chain[NX*NY];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      fpga_tile #(
        .SB_TYPE(SB_TYPE), .W(W), .S(S), .POS((x + y) % S), .N(N), .K(K), .I(I), .FCW(FCW),
        .IN_PCT(IN_PCT), .FB_PCT(FB_PCT)
      ) u_tile (
        .clk(clk), .rst_n(rst_n), .run(run), .cfg_rst_n(cfg_rst_n), .cfg_en(cfg_en),
        .cfg_in(chain[y*NX + x]), .cfg_out(chain[y*NX + x + 1]),
        .w_in(w_in[x][y]), .s_in(s_in[x][y]), .e_in(e_in[x][y]), .n_in(n_in[x][y]),
        .w_out(w_out[x][y]), .s_out(s_out[x][y]), .e_out(e_out[x][y]), .n_out(n_out[x][y])
      );

      if (x == 0) begin : g_wedge
        always_comb w_in[x][y]  = io_w_in[y];
        always_comb io_w_out[y] = w_out[x][y];
      end else begin : g_wlink
        always_comb w_in[x][y]  = e_out[x-1][y];
      end
      if (x == NX-1) begin : g_eedge
        always_comb e_in[x][y]  = io_e_in[y];
        always_comb io_e_out[y] = e_out[x][y];
      end else begin : g_elink
        always_comb e_in[x][y]  = w_out[x+1][y];
      end
      if (y == 0) begin : g_sedge
        always_comb s_in[x][y]  = io_s_in[x];
        always_comb io_s_out[x] = s_out[x][y];
      end else begin : g_slink
        always_comb s_in[x][y]  = n_out[x][y-1];
      end
      if (y == NY-1) begin : g_nedge
        always_comb n_in[x][y]  = io_n_in[x];
        always_comb io_n_out[x] = n_out[x][y];
      end else begin : g_nlink
        always_comb n_in[x][y]  = s_out[x][y+1];
      end
    end
  end
endmodule
