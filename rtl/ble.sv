// ble: basic logic element = K-input LUT, D flip-flop and a 2:1 output
// multiplexer controlled by one configuration bit.
//
// cfg[2^K-1:0] is the LUT truth table, cfg[2^K] selects the output:
// 0 = combinational (flip-flop bypassed), 1 = registered. The structure
// (LUT -> flip-flop -> SRAM-controlled bypass mux) follows the classic BLE;
// the D-type flip-flop and its active-low asynchronous reset
// to 0 are this design's choices. Registered output changes on the rising
// clock edge; combinational output follows the inputs in the same cycle.
//
// run is the global user-mode enable: while it is low (the fabric is being
// configured) the LUT output is held at 0, so a half-loaded configuration can
// form no oscillating loop and the flip-flop loads 0. This hold is this
// design's choice.
module ble #(
  parameter int unsigned K = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [(1<<K):0]   cfg,
  input  logic [K-1:0]      in,
  output logic              out
);
  logic lut_raw, lut_out;
  logic ff_q;

  lut #(.K(K)) u_lut (.cfg(cfg[(1<<K)-1:0]), .in(in), .out(lut_raw));

  always_comb lut_out = run & lut_raw;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ff_q <= 1'b0;
    else        ff_q <= lut_out;

  always_comb out = cfg[1<<K] ? ff_q : lut_out;
endmodule
