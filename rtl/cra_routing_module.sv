// cra_routing_module: the routing part of one CRA tile.
//
// A routing module surrounds its logic block and combines
//   * the switching core (turns, logic-block pins, extended paths),
//   * the bypass interconnects along both axes (fast straight wires),
//   * the configuration memory for both, as one shift chain.
// An incoming signal on a shared side wire either rides a bypass buffer
// straight across the module or enters the core through a pass switch to
// turn or to reach a logic-block input. Both the core and the bypass
// buffers may drive each side wire; the module brings both drivers out so
// that the wire itself (cra_wire_node) resolves them together with the
// neighbour's drivers.
//
// Configuration bit order is that of cra_pkg::cfg_*_bit. Loading takes
// tile_cfg_bits(W, D) clock cycles with cfg_shift high. The routing paths
// themselves are combinational. route_en masks the whole configuration:
// while it is low every switch and buffer is off, as an FPGA keeps its
// routing disabled while it is being configured; this also keeps a
// half-loaded or uninitialised configuration from closing a ring of
// drivers. route_en is this design's addition.
module cra_routing_module
  import cra_pkg::*;
#(
  parameter int unsigned W    = W_DEFAULT,
  parameter int unsigned D    = D_DEFAULT,
  parameter int unsigned NI   = NI_DEFAULT,
  parameter int unsigned NO   = NO_DEFAULT,
  parameter int unsigned SW   = sel_width(D),
  parameter int unsigned TPS  = taps_per_side(W, NI, NO),
  parameter int unsigned NCFG = tile_cfg_bits(W, D)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_shift,
  input  logic                       cfg_si,
  input  logic                       route_en,   // 0: every switch and buffer off
  output logic                       cfg_so,
  input  logic   [3:0][W-1:0]        side_in,    // shared wire values, side N, E, S, W
  input  logic   [NO-1:0]            lb_out,     // logic-block output pins
  output drive_t [3:0][W-1:0]        core_drv,   // switching core onto the side wires
  output drive_t [3:0][W-1:0]        byp_drv,    // bypass buffers onto the side wires
  output logic   [NI-1:0][4*TPS-1:0] lb_in_cand  // lines each logic-block input can read
);

  logic [NCFG-1:0] cfg, cfg_q;

  cra_config_chain #(.N(NCFG)) u_cfg (
    .clk   (clk),
    .rst_n (rst_n),
    .shift (cfg_shift),
    .si    (cfg_si),
    .so    (cfg_so),
    .q     (cfg_q)
  );

  // Global routing enable: while low (reset, configuration) the stored bits
  // are masked, so no MUX, pass switch or buffer is on.
  assign cfg = route_en ? cfg_q : '0;

  cra_switching_core #(.W(W), .D(D), .NI(NI), .NO(NO), .SW(SW), .TPS(TPS)) u_core (
    .ext_in     (side_in),
    .lb_out     (lb_out),
    .cfg_sel    (cfg[0 +: 4*W*SW]),
    .cfg_pass   (cfg[4*W*SW +: 4*W]),
    .ext_drv    (core_drv),
    .line       (),          // core lines are observed only through ext_drv and the taps
    .lb_in_cand (lb_in_cand)
  );

  cra_bypass #(.W(W)) u_byp (
    .side_in (side_in),
    .cfg     (cfg[4*W*(SW+1) +: 4*W]),
    .byp_drv (byp_drv)
  );

endmodule
