// interconnect_matrix: the programmable switch inside a logic block that
// feeds the N*K BLE inputs.
//
// Every BLE input (a "row") has its own multiplexer. The candidates of row r
// are the I cluster inputs followed by the N BLE feedbacks, thinned out by the
// depopulation pattern IN_PCT/FB_PCT: a cluster input c reaches row r when
// c % (100/IN_PCT) == r % (100/IN_PCT), a feedback f when
// f % (100/FB_PCT) == r % (100/FB_PCT). 100/100 is the fully connected matrix;
// 50/100, 25/100, 100/50, 50/50 and 25/25 are the depopulated ones. The
// A/B naming and the six patterns are the document's; the exact diagonal
// assignment of which pins go to which row is this design's choice.
//
// Each row's multiplexer is addressed by a SELW-bit binary select (a binary
// tree multiplexer): the value picks the n-th connected candidate in the order
// above; a select past the last candidate gives 0. Purely combinational.
//
// Config layout: cfg[r*SELW +: SELW] is the select of row r, row r = b*K + p
// feeds input p of BLE b.
module interconnect_matrix
  import fpga_pkg::*;
#(
  parameter int unsigned I      = 10,
  parameter int unsigned N      = 4,
  parameter int unsigned K      = 4,
  parameter int unsigned IN_PCT = 100,
  parameter int unsigned FB_PCT = 100,
  parameter int unsigned SELW   = $clog2(I + N + 1)
) (
  input  logic [I-1:0]          lb_in,
  input  logic [N-1:0]          fb,
  input  logic [N*K*SELW-1:0]   cfg,
  output logic [N*K-1:0]        ble_in
);
  logic [I+N-1:0] src;
  always_comb src = {fb, lb_in};

  for (genvar r = 0; r < N*K; r++) begin : g_row
    logic [SELW-1:0] sel;
    logic [I+N-1:0]  hit;
    always_comb sel = cfg[r*SELW +: SELW];
    for (genvar c = 0; c < I + N; c++) begin : g_src
      if (im_conn(r, c, I, IN_PCT, FB_PCT)) begin : g_on
        localparam int unsigned RANK = im_rank(r, c, I, IN_PCT, FB_PCT);
        always_comb hit[c] = (sel == SELW'(RANK)) & src[c];
      end else begin : g_off
        always_comb hit[c] = 1'b0;
      end
    end
    always_comb ble_in[r] = |hit;
  end
endmodule
