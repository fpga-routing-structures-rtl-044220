// classic_switch_block: the three earlier switch block patterns the Imran
// block is measured against, disjoint, universal and Wilton, built for the
// same segmented channel (length-S wires, staggered ends) so a tile can use
// any of them in place of imran_switch_block.
//
// Every pattern says which track j on side B an incoming track i on side A
// may connect to; each wire end reaches three others (Fs = 3):
//   disjoint   : left/right/top/bottom i <-> i on every other side
//   universal  : L i-R i, T i-B i, L i-B i, R i-T i, L i-T W-1-i, R i-B W-1-i
//   Wilton     : L i-R i, T i-B i, L i-T (W-i)%W, L i-B (i-1)%W,
//                R i-T (i-1)%W, R i-B (2W-2-i)%W
// The patterns (and the Wilton rotation rule) are the published ones; the
// Wilton formula is the standard form of its rotated diagonals.
//
// In a segmented channel a track that ends here has four separate wire
// ends and gets all six switches of the pattern (LR, TB, LT, LB, RT, RB).
// A track that passes through is one wire on both sides; it keeps only the
// four turning switches of the pattern, applied to the whole wire. With the
// disjoint pattern all four join the same two wires, so one switch is
// built; with universal and Wilton they reach different tracks and four are
// built. These counts follow the document's drawings of the disjoint and
// Wilton implementations; using the full-width pattern (not only the ending
// tracks, as the Imran block does) is this design's reading of how the
// earlier blocks are used with longer wires.
//
// Routing flows are as in imran_switch_block: <side>_in is the OR of what
// drives the wire beyond this block, <side>_out what this block puts on it;
// a pass-through wire forwards each side's _in to the other side's _out.
// Purely combinational.
//
// Config layout: track by track, t = 0..W-1; an ending track has 6 bits
// (LR, TB, LT, LB, RT, RB), a pass-through track 1 (disjoint) or 4 (LT, LB,
// RT, RB) bits. SB_BITS = sb_bits(TYPE, W, M).
module classic_switch_block
  import fpga_pkg::*;
#(
  parameter int unsigned TYPE    = SB_WILTON,
  parameter int unsigned W       = 16,
  parameter int unsigned S       = 4,
  parameter int unsigned POS     = 0,
  parameter int unsigned M       = term_count(POS, W, S),
  parameter int unsigned SB_BITS = sb_bits(TYPE, W, M)
) (
  input  logic [SB_BITS-1:0] cfg,
  input  logic [W-1:0]       l_in, t_in, r_in, b_in,
  output logic [W-1:0]       l_out, t_out, r_out, b_out
);
  // Wire ends are numbered side*W + track with sides L=0, T=1, R=2, B=3.
  // A pass-through wire is named by its left (horizontal) or top (vertical)
  // end.

  // Track on the far side of turn g (2 = LT, 3 = LB, 4 = RT, 5 = RB) from t.
  function automatic int unsigned turn(int unsigned g, int unsigned t);
    case (TYPE)
      SB_DISJOINT:  return t;
      SB_UNIVERSAL: return (g == 2 || g == 5) ? W - 1 - t : t;
      default:      case (g)
                      2:       return wl_lt(t, W);
                      3:       return wl_lb(t, W);
                      4:       return wl_rt(t, W);
                      default: return wl_rb(t, W);
                    endcase
    endcase
  endfunction

  function automatic int unsigned name_end(int unsigned e);
    int unsigned side, t;
    side = e / W;
    t    = e % W;
    if (track_terminates(POS, t, S)) return e;
    return ((side == 0 || side == 2) ? 0 : W) + t;
  endfunction

  function automatic int unsigned n_sw(int unsigned t);
    if (track_terminates(POS, t, S)) return 6;
    return (TYPE == SB_DISJOINT) ? 1 : 4;
  endfunction

  function automatic int unsigned first_bit(int unsigned t);
    int unsigned n;
    n = 0;
    for (int unsigned u = 0; u < t; u++) n += n_sw(u);
    return n;
  endfunction

  // Ends joined by switch k of track t (k counts from LR on ending tracks,
  // from LT on pass-through tracks).
  function automatic int unsigned sw_a(int unsigned t, int unsigned k);
    int unsigned g;
    g = track_terminates(POS, t, S) ? k : k + 2;
    case (g)
      0, 2, 3: return name_end(0 * W + t);
      1:       return name_end(1 * W + t);
      default: return name_end(2 * W + t);
    endcase
  endfunction

  function automatic int unsigned sw_b(int unsigned t, int unsigned k);
    int unsigned g;
    g = track_terminates(POS, t, S) ? k : k + 2;
    case (g)
      0:       return name_end(2 * W + t);
      1:       return name_end(3 * W + t);
      2, 4:    return name_end(1 * W + turn(g, t));
      default: return name_end(3 * W + turn(g, t));
    endcase
  endfunction

  logic [4*W-1:0] end_in;    // value arriving at each wire (by its name)
  logic [4*W-1:0] sw_out;    // OR of what the switches bring to each wire
  logic [4*W-1:0] part [SB_BITS];

  for (genvar t = 0; t < W; t++) begin : g_in
    if (track_terminates(POS, t, S)) begin : g_term
      always_comb begin
        end_in[0*W + t] = l_in[t];
        end_in[1*W + t] = t_in[t];
        end_in[2*W + t] = r_in[t];
        end_in[3*W + t] = b_in[t];
      end
    end else begin : g_pass
      always_comb begin
        end_in[0*W + t] = l_in[t] | r_in[t];
        end_in[1*W + t] = t_in[t] | b_in[t];
        end_in[2*W + t] = 1'b0;   // unused names of a pass-through wire
        end_in[3*W + t] = 1'b0;
      end
    end
    for (genvar k = 0; k < n_sw(t); k++) begin : g_sw
      localparam int unsigned A   = sw_a(t, k);
      localparam int unsigned B   = sw_b(t, k);
      localparam int unsigned BIT = first_bit(t) + k;
      always_comb begin
        part[BIT]    = '0;
        part[BIT][A] = cfg[BIT] & end_in[B];
        part[BIT][B] = cfg[BIT] & end_in[A];
      end
    end
  end

  always_comb begin
    sw_out = '0;
    for (int unsigned k = 0; k < SB_BITS; k++) sw_out |= part[k];
  end

  for (genvar t = 0; t < W; t++) begin : g_out
    if (track_terminates(POS, t, S)) begin : g_term
      always_comb begin
        l_out[t] = sw_out[0*W + t];
        t_out[t] = sw_out[1*W + t];
        r_out[t] = sw_out[2*W + t];
        b_out[t] = sw_out[3*W + t];
      end
    end else begin : g_pass
      always_comb begin
        l_out[t] = r_in[t] | sw_out[0*W + t];
        r_out[t] = l_in[t] | sw_out[0*W + t];
        t_out[t] = b_in[t] | sw_out[1*W + t];
        b_out[t] = t_in[t] | sw_out[1*W + t];
      end
    end
  end
endmodule
