// lut: k-input look-up table.
//
// The 2^K configuration bits hold the truth table; the K inputs select one of
// them through a 2^K:1 multiplexer, as in the SRAM-plus-multiplexer LUT of the
// classic island-style FPGA. Bit index = the input vector read as an unsigned
// number (in[0] is the least significant select bit). Purely combinational.
module lut #(
  parameter int unsigned K = 4
) (
  input  logic [(1<<K)-1:0] cfg,   // truth table
  input  logic [K-1:0]      in,
  output logic              out
);
  always_comb out = cfg[in];
endmodule
