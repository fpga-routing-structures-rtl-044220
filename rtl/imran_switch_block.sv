// imran_switch_block: switch block for segmented routing in which every track
// has the same length S and segment ends are staggered.
//
// At any switch block M of the W tracks of each channel terminate (M = W/S
// when S divides W, otherwise W/S rounded up or down depending on POS) (their wire
// ends here and a new wire starts) and the other W-M tracks pass straight
// through. The two subsets are switched differently:
//   * terminating tracks use a Wilton pattern among themselves: each wire end
//     has three switches, one to a terminating track on each other side, with
//     the turning connections rotated by one track (6 switches per track
//     index, 6*M configuration bits);
//   * pass-through tracks use a disjoint pattern: horizontal track t and
//     vertical track t are joined by a single switch (W-M bits), which gives
//     all four turns because both wires continue on both sides.
// This is the document's proposed block: routability close to Wilton with the
// switch count of the disjoint block on pass-through wires. The exact Wilton
// track mapping and the stagger rule (track t terminates where
// (POS + t) % S == 0, POS = (x + y) % S) are this design's choices.
//
// Signal model. Every routing wire is a wired-OR net: its value is the OR of
// all drivers placed on it, an undriven wire reads 0. Each side of the block
// carries two W-bit flows per track: <side>_in, the OR of everything driven on
// that wire beyond this switch block, and <side>_out, the OR of everything
// this switch block (and the wires it joins) contributes to that wire. An
// enabled switch is bidirectional (a pass transistor): it passes each side's
// _in flow to the other side's _out flow. A signal can therefore take any
// number of switches at one switch block from the wire it arrives on, but not
// hop twice inside the block. Purely combinational.
//
// Config layout: cfg[p] for p < W-M is the disjoint switch of the p-th
// pass-through track (ascending track number); cfg[W-M + g*M + j] is Wilton
// switch group g (fpga_pkg WG_*) for local terminating index j.
module imran_switch_block
  import fpga_pkg::*;
#(
  parameter int unsigned W       = 16,
  parameter int unsigned S       = 4,
  parameter int unsigned POS     = 0,
  parameter int unsigned M       = term_count(POS, W, S),
  parameter int unsigned SB_BITS = (W - M) + 6 * M
) (
  input  logic [SB_BITS-1:0] cfg,
  input  logic [W-1:0]       l_in, t_in, r_in, b_in,
  output logic [W-1:0]       l_out, t_out, r_out, b_out
);
  localparam int unsigned PB = W - M;  // number of pass-through bits

  for (genvar t = 0; t < W; t++) begin : g_trk
    if (!track_terminates(POS, t, S)) begin : g_pass
      // Wire continues: each side receives what arrives from the other side,
      // plus whatever the disjoint switch brings from the crossing wire.
      localparam int unsigned P = pass_rank(POS, t, S);
      logic h_from_v, v_from_h;
      always_comb begin
        h_from_v = cfg[P] & (t_in[t] | b_in[t]);
        v_from_h = cfg[P] & (l_in[t] | r_in[t]);
        l_out[t] = r_in[t] | h_from_v;
        r_out[t] = l_in[t] | h_from_v;
        t_out[t] = b_in[t] | v_from_h;
        b_out[t] = t_in[t] | v_from_h;
      end
    end else begin : g_term
      // Wire ends: four separate wire ends, joined by the Wilton switches.
      localparam int unsigned J   = t / S;                 // local index
      localparam int unsigned TLT = term_track(POS, wl_lt(J, M), S);
      localparam int unsigned TLB = term_track(POS, wl_lb(J, M), S);
      localparam int unsigned TTL = term_track(POS, wl_tl(J, M), S);
      localparam int unsigned TTR = term_track(POS, wl_tr(J, M), S);
      localparam int unsigned TRT = term_track(POS, wl_rt(J, M), S);
      localparam int unsigned TRB = term_track(POS, wl_rb(J, M), S);
      localparam int unsigned TBL = term_track(POS, wl_bl(J, M), S);
      localparam int unsigned TBR = term_track(POS, wl_br(J, M), S);
      always_comb begin
        l_out[t] = (cfg[PB + WG_LR*M + J]             & r_in[t])
                 | (cfg[PB + WG_LT*M + J]             & t_in[TLT])
                 | (cfg[PB + WG_LB*M + J]             & b_in[TLB]);
        t_out[t] = (cfg[PB + WG_TB*M + J]             & b_in[t])
                 | (cfg[PB + WG_LT*M + wl_tl(J, M)]   & l_in[TTL])
                 | (cfg[PB + WG_RT*M + wl_tr(J, M)]   & r_in[TTR]);
        r_out[t] = (cfg[PB + WG_LR*M + J]             & l_in[t])
                 | (cfg[PB + WG_RT*M + J]             & t_in[TRT])
                 | (cfg[PB + WG_RB*M + J]             & b_in[TRB]);
        b_out[t] = (cfg[PB + WG_TB*M + J]             & t_in[t])
                 | (cfg[PB + WG_LB*M + wl_bl(J, M)]   & l_in[TBL])
                 | (cfg[PB + WG_RB*M + wl_br(J, M)]   & r_in[TBR]);
      end
    end
  end
endmodule
