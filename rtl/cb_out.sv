// cb_out: output connection block. Lets each of the N logic-block outputs
// drive routing tracks of the neighbouring channel.
//
// Output o can drive FCW = Fc*W tracks, (o + j*(W/FCW)) % W for
// j = 0..FCW-1, each through one programmable switch (cfg[o*FCW + j]).
// drv[t] is the OR of every output switched onto track t; it joins the
// wired-OR value of that track. Fc and W are the document's parameters; the
// track spread is this design's choice. Purely combinational.
module cb_out
  import fpga_pkg::*;
#(
  parameter int unsigned W   = 16,
  parameter int unsigned N   = 4,
  parameter int unsigned FCW = 8
) (
  input  logic [N-1:0]     lb_out,
  input  logic [N*FCW-1:0] cfg,
  output logic [W-1:0]     drv
);
  for (genvar t = 0; t < W; t++) begin : g_trk
    logic [N*FCW-1:0] hit;
    for (genvar o = 0; o < N; o++) begin : g_o
      for (genvar j = 0; j < FCW; j++) begin : g_sw
        if (cb_track(o, j, W, FCW) == t) begin : g_on
          always_comb hit[o*FCW + j] = cfg[o*FCW + j] & lb_out[o];
        end else begin : g_off
          always_comb hit[o*FCW + j] = 1'b0;
        end
      end
    end
    always_comb drv[t] = |hit;
  end
endmodule
