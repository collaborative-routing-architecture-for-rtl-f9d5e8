// cra_switching_core: the switching core of one CRA routing module.
//
// The core does the work of both the switch box and the connection box of
// a conventional FPGA. Each side s (N, E, S, W) has W track positions. At
// track position (s, t) there is
//   * a core line, which runs across the core and is read by MUXes of the
//     two perpendicular sides and by logic-block input taps,
//   * a (d+1)-input MUX (cra_core_mux) whose output drives that core line,
//   * a pass switch that joins the core line to the shared wire outside
//     the core on that side.
// A signal arriving on side s track t enters through its pass switch onto
// line (s, t); a MUX on a perpendicular side picks it up (a turn) and drives
// its own line, and leaves through that line's pass switch. Because MUX
// outputs are core lines that other MUXes read, a signal may pass several
// MUXes inside one core: these are the extended switching paths, which
// reach track pairs that have no direct switching point, at the cost of
// more delay. The MUX input pattern (cra_pkg::mux_src_side/_track) gives
// the band of direct switching points |r - c| <= 1 for d = 3.
//
// Electrical model (two-valued): the line value is the MUX output when the
// MUX drives, else the outside wire when the pass switch is on, else 0.
// The core drives the outside wire (ext_drv.en) only when the pass switch
// is on and the MUX drives.
//
// Taps that would fall on a track above W-1 (inputs 8..15, tap 3 at the
// defaults) do not exist and read constant 0, as do MUX inputs whose
// source track is off the edge of the core.
//
// Combinational; no clock. The MUX ring (line -> MUX -> line) is a
// structural combinational loop inherent to any programmable interconnect;
// only a configuration that closes a ring of enabled MUXes makes it a real
// loop, and such a configuration is invalid.
module cra_switching_core
  import cra_pkg::*;
#(
  parameter int unsigned W   = W_DEFAULT,
  parameter int unsigned D   = D_DEFAULT,
  parameter int unsigned NI  = NI_DEFAULT,
  parameter int unsigned NO  = NO_DEFAULT,
  parameter int unsigned SW  = sel_width(D),
  parameter int unsigned TPS = taps_per_side(W, NI, NO)
) (
  input  logic   [3:0][W-1:0]     ext_in,     // value of the outside wire at each pass switch
  input  logic   [NO-1:0]         lb_out,     // logic-block output pins
  input  logic   [4*W*SW-1:0]     cfg_sel,    // MUX select fields, field s*W+t
  input  logic   [4*W-1:0]        cfg_pass,   // pass switches, bit s*W+t
  output drive_t [3:0][W-1:0]     ext_drv,    // drive onto the outside wire
  output logic   [3:0][W-1:0]     line,       // core line values
  output logic   [NI-1:0][4*TPS-1:0] lb_in_cand // candidate lines of each LB input, tap s*TPS+m
);

  logic   ln  [4][W];
  drive_t mux [4][W];

  for (genvar s = 0; s < 4; s++) begin : g_side
    for (genvar t = 0; t < W; t++) begin : g_trk
      logic [D-1:0] sw_in;
      for (genvar k = 0; k < D; k++) begin : g_in
        localparam int SRC_T = mux_src_track(t, k, W);
        localparam int SRC_S = mux_src_side(s, k);
        if (SRC_T >= 0) begin : g_con
          assign sw_in[k] = ln[SRC_S][SRC_T];
        end else begin : g_tie
          assign sw_in[k] = 1'b0;
        end
      end

      cra_core_mux #(.D(D), .SW(SW)) u_mux (
        .sw_in (sw_in),
        .lb_in (lb_out[lb_out_of_track(t, NO)]),
        .sel   (cfg_sel[(s*W + t)*SW +: SW]),
        .drv   (mux[s][t])
      );

      assign ln[s][t] = mux[s][t].en ? mux[s][t].val
                                     : (cfg_pass[s*W + t] & ext_in[s][t]);
      assign ext_drv[s][t] = '{en: cfg_pass[s*W + t] & mux[s][t].en, val: mux[s][t].val};
      assign line[s][t]    = ln[s][t];
    end
  end

  // Logic-block input taps: input j reads the lines of the tracks dealt to
  // its pin on every side.
  for (genvar j = 0; j < NI; j++) begin : g_lbin
    for (genvar s = 0; s < 4; s++) begin : g_side
      for (genvar m = 0; m < TPS; m++) begin : g_tap
        localparam int TR = lb_in_tap_track(j, m, W, NI, NO);
        if (TR >= 0) begin : g_con
          assign lb_in_cand[j][s*TPS + m] = ln[s][TR];
        end else begin : g_tie
          assign lb_in_cand[j][s*TPS + m] = 1'b0;
        end
      end
    end
  end

endmodule
