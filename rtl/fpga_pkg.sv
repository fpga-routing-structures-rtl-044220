// fpga_pkg: shared constants and elaboration-time helper functions for the
// island-style segmented FPGA fabric.
//
// The functions here fix the connection patterns of the fabric:
//   * which tracks terminate at a switch block (staggered segments of length S),
//   * the Wilton track mapping used between terminating tracks,
//   * which cluster inputs / feedbacks reach which BLE input in a fully
//     connected or depopulated interconnect matrix,
//   * which tracks a connection-block pin can reach.
// All of them are pure functions of parameters; they are evaluated during
// elaboration and produce only wiring, no logic.
package fpga_pkg;

  // Sides of a switch block, used for documentation and testbench bookkeeping.
  typedef enum logic [1:0] {SIDE_L = 2'd0, SIDE_T = 2'd1, SIDE_R = 2'd2, SIDE_B = 2'd3} side_e;

  // Index of the six Wilton switch groups of one terminating track set.
  // Each group holds M bits, indexed by the local track number on the first
  // side named:  LR: L j <-> R j            TB: T j <-> B j
  //              LT: L j <-> T (M-j)%M      LB: L j <-> B (j-1)%M
  //              RT: R j <-> T (j-1)%M      RB: R j <-> B (2M-2-j)%M
  localparam int unsigned WG_LR = 0;
  localparam int unsigned WG_TB = 1;
  localparam int unsigned WG_LT = 2;
  localparam int unsigned WG_LB = 3;
  localparam int unsigned WG_RT = 4;
  localparam int unsigned WG_RB = 5;

  // Switch block patterns a tile can be built with (fpga_tile SB_TYPE):
  // the Imran block, or one of the three earlier blocks it is compared with.
  localparam int unsigned SB_IMRAN     = 0;
  localparam int unsigned SB_DISJOINT  = 1;
  localparam int unsigned SB_UNIVERSAL = 2;
  localparam int unsigned SB_WILTON    = 3;

  // Configuration bits of a switch block of type sb_type with m of its w
  // tracks ending at it: 6 switches per ending track; per pass-through track
  // 1 for the Imran and disjoint blocks, 4 for the universal and Wilton ones.
  function automatic int unsigned sb_bits(int unsigned sb_type, int unsigned w, int unsigned m);
    return 6 * m + ((sb_type == SB_UNIVERSAL || sb_type == SB_WILTON) ? 4 : 1) * (w - m);
  endfunction

  // A track t of a channel terminates (ends and a new wire starts) at the
  // switch block whose position class is pos when (pos + t) % s == 0.
  // pos = (x + y) % s, so horizontal and vertical tracks with the same index
  // terminate at the same switch blocks.
  function automatic bit track_terminates(int unsigned pos, int unsigned t, int unsigned s);
    return ((pos + t) % s) == 0;
  endfunction

  // Number of tracks of a W-track channel that terminate at a switch block of
  // class pos. It is W/S when S divides W and otherwise floor or ceil of it.
  function automatic int unsigned term_count(int unsigned pos, int unsigned w, int unsigned s);
    int unsigned n;
    n = 0;
    for (int unsigned t = 0; t < w; t++)
      if (track_terminates(pos, t, s)) n++;
    return n;
  endfunction

  // Track number of the j-th terminating track at a switch block of class pos.
  function automatic int unsigned term_track(int unsigned pos, int unsigned j, int unsigned s);
    return j * s + ((s - (pos % s)) % s);
  endfunction

  // Rank of a pass-through track among the pass-through tracks (0-based).
  function automatic int unsigned pass_rank(int unsigned pos, int unsigned t, int unsigned s);
    int unsigned r;
    r = 0;
    for (int unsigned u = 0; u < t; u++)
      if (!track_terminates(pos, u, s)) r++;
    return r;
  endfunction

  // Wilton mappings between local indices of the terminating subset (size m).
  function automatic int unsigned wl_lt(int unsigned j, int unsigned m); return (m - j) % m;         endfunction
  function automatic int unsigned wl_lb(int unsigned j, int unsigned m); return (j + m - 1) % m;     endfunction
  function automatic int unsigned wl_rt(int unsigned j, int unsigned m); return (j + m - 1) % m;     endfunction
  function automatic int unsigned wl_rb(int unsigned j, int unsigned m); return (2*m - 2 - j) % m;   endfunction
  // Inverses seen from the other side.
  function automatic int unsigned wl_tl(int unsigned j, int unsigned m); return (m - j) % m;         endfunction
  function automatic int unsigned wl_bl(int unsigned j, int unsigned m); return (j + 1) % m;         endfunction
  function automatic int unsigned wl_tr(int unsigned j, int unsigned m); return (j + 1) % m;         endfunction
  function automatic int unsigned wl_br(int unsigned j, int unsigned m); return (2*m - 2 - j) % m;   endfunction

  // Depopulation: a source of index c reaches BLE input row r when
  // c % period == r % period, where period = 100 / pct (1, 2 or 4 for
  // 100, 50 and 25 percent).  Each source then reaches pct % of the rows.
  function automatic int unsigned pct_period(int unsigned pct);
    return (pct >= 100) ? 1 : (100 / pct);
  endfunction

  function automatic bit im_in_conn(int unsigned row, int unsigned c, int unsigned pct);
    return (c % pct_period(pct)) == (row % pct_period(pct));
  endfunction

  // Source list of one matrix row: cluster inputs 0..i-1 come first, then
  // feedbacks 0..n-1.  Returns whether source c (0..i+n-1) reaches the row.
  function automatic bit im_conn(int unsigned row, int unsigned c, int unsigned i, int unsigned in_pct,
                                 int unsigned fb_pct);
    if (c < i) return im_in_conn(row, c, in_pct);
    return im_in_conn(row, c - i, fb_pct);
  endfunction

  // Position of source c in the row's compacted source list.
  function automatic int unsigned im_rank(int unsigned row, int unsigned c, int unsigned i,
                                          int unsigned in_pct, int unsigned fb_pct);
    int unsigned r;
    r = 0;
    for (int unsigned u = 0; u < c; u++)
      if (im_conn(row, u, i, in_pct, fb_pct)) r++;
    return r;
  endfunction

  // Connection blocks: pin p reaches tracks (p + j*(w/fcw)) % w, j = 0..fcw-1.
  function automatic int unsigned cb_track(int unsigned p, int unsigned j, int unsigned w, int unsigned fcw);
    return (p + j * (w / fcw)) % w;
  endfunction

endpackage
