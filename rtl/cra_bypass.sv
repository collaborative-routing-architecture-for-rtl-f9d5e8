// cra_bypass: the bypass interconnects of one CRA routing module.
//
// For every track t of each axis a bypass interconnect crosses the module
// without entering the switching core. It is two unidirectional wires, each
// behind its own tri-state buffer with one configuration bit, so a chain of
// bypasses in neighbouring modules forms a long wire with no switching
// point on it. Per module that is 4W buffers and 4W bits (288 each at
// W = 72), as in the source design.
//
// side_in[s][t] is the value of the shared wire on side s, track t;
// byp_drv[s][t] is this module's buffer driving that wire:
//   cfg bit 0*W+t  west -> east   drives side E from side W
//   cfg bit 1*W+t  east -> west   drives side W from side E
//   cfg bit 2*W+t  south -> north drives side N from side S
//   cfg bit 3*W+t  north -> south drives side S from side N
// A disabled buffer is high-Z (en = 0, val = 0). Combinational; no clock.
module cra_bypass
  import cra_pkg::*;
#(
  parameter int unsigned W = W_DEFAULT
) (
  input  logic   [3:0][W-1:0] side_in,  // shared wire values, side N, E, S, W
  input  logic   [4*W-1:0]    cfg,      // buffer enables, dir*W + t
  output drive_t [3:0][W-1:0] byp_drv   // buffer outputs onto the shared wires
);

  for (genvar t = 0; t < W; t++) begin : g_trk
    assign byp_drv[SIDE_E][t] = '{en: cfg[0*W+t], val: cfg[0*W+t] & side_in[SIDE_W][t]};
    assign byp_drv[SIDE_W][t] = '{en: cfg[1*W+t], val: cfg[1*W+t] & side_in[SIDE_E][t]};
    assign byp_drv[SIDE_N][t] = '{en: cfg[2*W+t], val: cfg[2*W+t] & side_in[SIDE_S][t]};
    assign byp_drv[SIDE_S][t] = '{en: cfg[3*W+t], val: cfg[3*W+t] & side_in[SIDE_N][t]};
  end

endmodule
