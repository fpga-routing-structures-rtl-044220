// cb_in: input connection block. Connects each of the I logic-block input
// pins to the routing tracks of the neighbouring channel.
//
// Pin p can reach FCW = Fc*W tracks, (p + j*(W/FCW)) % W for j = 0..FCW-1,
// each through one programmable switch (cfg[p*FCW + j]). A pin with no switch
// on reads 0; with more than one on it reads the OR of the tracks (a
// configuration fault that a real pass-transistor switch would short).
// Fc and W are the document's parameters; the track spread is this design's
// choice. Purely combinational.
module cb_in
  import fpga_pkg::*;
#(
  parameter int unsigned W   = 16,
  parameter int unsigned I   = 10,
  parameter int unsigned FCW = 8
) (
  input  logic [W-1:0]     track,
  input  logic [I*FCW-1:0] cfg,
  output logic [I-1:0]     pin
);
  for (genvar p = 0; p < I; p++) begin : g_pin
    logic [FCW-1:0] hit;
    for (genvar j = 0; j < FCW; j++) begin : g_sw
      always_comb hit[j] = cfg[p*FCW + j] & track[cb_track(p, j, W, FCW)];
    end
    always_comb pin[p] = |hit;
  end
endmodule
