// config_chain: the configuration memory of one tile, written serially.
//
// WIDTH configuration cells form a shift register. While shift_en is high,
// each rising clock edge moves every bit one place toward bit 0, takes sin
// into bit WIDTH-1 and presents bit 0 on sout, so tiles can be chained
// sout -> sin. After WIDTH shifts the first bit shifted in sits in q[0].
// With shift_en low the cells hold their value. Reset clears every cell,
// which leaves all switches open and all LUTs at constant 0.
// The document only says that each switch is controlled by an SRAM cell; the
// serial loading scheme and the reset are this design's choices.
module config_chain #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             sin,
  output logic             sout,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= WIDTH'({sin, q} >> 1);

  always_comb sout = q[0];
endmodule
