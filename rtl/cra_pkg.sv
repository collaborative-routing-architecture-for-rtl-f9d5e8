// cra_pkg: types, default sizes and wiring rules shared by the Collaborative
// Routing Architecture (CRA) fabric.
//
// The CRA replaces the separate switch boxes and connection boxes of an
// island-style FPGA by one routing module per tile. A routing module holds
// short bypass wires along both axes and a switching core made of MUXes that
// turns signals between sides, injects logic-block outputs and feeds
// logic-block inputs.
//
// Default sizes follow the published configuration: channel width W = 72,
// switching density d = 3, logic block with 16 inputs and 4 outputs. The
// MUX select encoding, the exact MUX input pattern, the pin-to-track
// assignment and the configuration bit order are this design's own choices,
// written here as functions so every module and testbench uses one rule.
// The MUX input pattern was chosen to reproduce the published 3 x 3
// switching-point pattern (direct points on the band |r - c| <= 1) and
// its example extended path W2 -> N2 -> W1 -> S0.
//
// Side numbering: N = 0, E = 1, S = 2, W = 3. Track t of side N/S is a
// vertical track, of side E/W a horizontal track.
package cra_pkg;

  // Published sizes.
  localparam int unsigned W_DEFAULT   = 72;  // switching width (tracks per side)
  localparam int unsigned D_DEFAULT   = 3;   // switching density
  localparam int unsigned NI_DEFAULT  = 16;  // logic-block inputs
  localparam int unsigned NO_DEFAULT  = 4;   // logic-block outputs

  typedef enum logic [1:0] {SIDE_N = 2'd0, SIDE_E = 2'd1, SIDE_S = 2'd2, SIDE_W = 2'd3} side_e;

  // One tri-state driver onto a shared wire: enable and the value it drives.
  typedef struct packed {
    logic en;
    logic val;
  } drive_t;

  // Width of one MUX select field: d + 2 patterns (high-Z, d switching
  // inputs, the logic-block output). For d = 3 this is 3 bits.
  function automatic int unsigned sel_width(input int unsigned d);
    return $clog2(d + 2);
  endfunction

  // Select encoding: 0 = high-Z, 1..d = switching input k = sel-1,
  // d+1 = logic-block output; codes above d+1 are also high-Z.
  function automatic int unsigned sel_for_input(input int unsigned k);
    return k + 1;
  endfunction
  function automatic int unsigned sel_for_lb(input int unsigned d);
    return d + 1;
  endfunction

  // The two sides perpendicular to side s, called A and B.
  //   N: A = W, B = E     S: A = E, B = W
  //   E: A = N, B = S     W: A = S, B = N
  function automatic int unsigned perp_a(input int unsigned s);
    case (s)
      0: return 3;
      1: return 0;
      2: return 1;
      default: return 2;
    endcase
  endfunction
  function automatic int unsigned perp_b(input int unsigned s);
    case (s)
      0: return 1;
      1: return 2;
      2: return 3;
      default: return 0;
    endcase
  endfunction

  // Source of switching input k of the MUX on side s, track t:
  //   k = 0      : side A, track t
  //   k = 1      : side B, track t
  //   k = 2j     : side B, track t + j   (j >= 1)
  //   k = 2j + 1 : side A, track t - j   (j >= 1)
  // For d = 3 a horizontal track r can turn directly onto vertical tracks
  // r-1, r and r+1: the band of switching points of a 3 x 3 core.
  function automatic int unsigned mux_src_side(input int unsigned s, input int unsigned k);
    if (k == 0) return perp_a(s);
    if (k == 1) return perp_b(s);
    return (k % 2 == 0) ? perp_b(s) : perp_a(s);
  endfunction
  // Source track, or -1 when it falls outside 0..w-1 (input tied to 0).
  function automatic int mux_src_track(input int unsigned t, input int unsigned k,
                                       input int unsigned w);
    int tr;
    if (k < 2)            tr = int'(t);
    else if (k % 2 == 0)  tr = int'(t) + int'(k / 2);
    else                  tr = int'(t) - int'(k / 2);
    if (tr < 0 || tr >= int'(w)) return -1;
    return tr;
  endfunction

  // Logic-block pins are dealt round-robin over the tracks of every side,
  // pin p = t mod (ni + no). Pins 0..no-1 are outputs, no..no+ni-1 inputs.
  // Every MUX's last input is logic-block output (t mod no).
  function automatic int unsigned lb_out_of_track(input int unsigned t, input int unsigned no);
    return t % no;
  endfunction
  // Number of taps per side for one logic-block input.
  function automatic int unsigned taps_per_side(input int unsigned w, input int unsigned ni,
                                                input int unsigned no);
    return (w + ni + no - 1) / (ni + no);
  endfunction
  // Track of tap number m of input pin j on any side, or -1 if none.
  function automatic int lb_in_tap_track(input int unsigned j, input int unsigned m,
                                         input int unsigned w, input int unsigned ni,
                                         input int unsigned no);
    int unsigned tr;
    tr = m * (ni + no) + no + j;
    if (tr >= w) return -1;
    return int'(tr);
  endfunction

  // Configuration bits of one tile, in chain order (bit 0 shifted in first):
  //   [0 .. 4W*SW-1]          MUX selects, field of (s*W + t), LSB first
  //   [4W*SW .. 4W*SW+4W-1]   pass switches, bit s*W + t
  //   [4W*(SW+1) ..]          bypass buffers, bit dir*W + t with
  //                           dir 0 = west->east, 1 = east->west,
  //                           2 = south->north, 3 = north->south
  function automatic int unsigned tile_cfg_bits(input int unsigned w, input int unsigned d);
    return 4 * w * (sel_width(d) + 2);
  endfunction
  function automatic int unsigned cfg_sel_bit(input int unsigned s, input int unsigned t,
                                              input int unsigned b, input int unsigned w,
                                              input int unsigned d);
    return (s * w + t) * sel_width(d) + b;
  endfunction
  function automatic int unsigned cfg_pass_bit(input int unsigned s, input int unsigned t,
                                               input int unsigned w, input int unsigned d);
    return 4 * w * sel_width(d) + s * w + t;
  endfunction
  function automatic int unsigned cfg_byp_bit(input int unsigned dir, input int unsigned t,
                                              input int unsigned w, input int unsigned d);
    return 4 * w * (sel_width(d) + 1) + dir * w + t;
  endfunction

endpackage
