// cra_fabric: an NX x NY array of CRA tiles, the routing fabric of the FPGA.
//
// Each tile is a routing module (cra_routing_module) wrapped around a
// logic block. Neighbouring modules share the wires on their common edge:
// horizontal track t between column x-1 and column x of row y is wire
// h(x, y, t), x = 0..NX; vertical track t between row y-1 and row y of
// column x is wire v(x, y, t), y = 0..NY. Each shared wire (cra_wire_node)
// has up to four drivers: the switching core and the bypass buffer of each
// neighbour. On the array edge the missing neighbour is replaced by an
// I/O driver (io_*_drv), and every edge wire's value is brought out
// (io_*_val). A long wire is a chain of bypass buffers through several
// modules; a turn goes through a switching core.
//
// The logic blocks themselves are outside this module: their output pins
// come in on lb_out, and lb_in_cand gives, for every input pin, the core
// lines it can read.
//
// Configuration: all tiles form one shift chain. Tile k = y*NX + x holds
// chain bits [k*NCFG +: NCFG]; cfg_in enters at the last tile and cfg_out
// leaves from tile 0, so the whole array is loaded by shifting bit 0 of
// tile 0 first, NX*NY*NCFG cycles in all. Hold route_en low while loading:
// it switches every driver off until the configuration is complete (this
// design's addition). conflict is high while any wire
// has more than one enabled driver, i.e. the configuration is invalid.
//
// The array size is this design's choice (the source gives none); W, d,
// and the logic-block pin counts default to the published values. The
// combinational loops through cores and wires are inherent to programmable
// routing; a valid configuration never closes one.
module cra_fabric
  import cra_pkg::*;
#(
  parameter int unsigned NX   = 4,
  parameter int unsigned NY   = 4,
  parameter int unsigned W    = W_DEFAULT,
  parameter int unsigned D    = D_DEFAULT,
  parameter int unsigned NI   = NI_DEFAULT,
  parameter int unsigned NO   = NO_DEFAULT,
  parameter int unsigned TPS  = taps_per_side(W, NI, NO),
  parameter int unsigned NCFG = tile_cfg_bits(W, D)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cfg_shift,
  input  logic                        cfg_in,
  input  logic                        route_en,   // 0: all routing off (during configuration)
  output logic                        cfg_out,
  // array-edge I/O: drivers onto, and values of, the edge wires
  input  drive_t [NY-1:0][W-1:0]      io_w_drv,
  input  drive_t [NY-1:0][W-1:0]      io_e_drv,
  input  drive_t [NX-1:0][W-1:0]      io_s_drv,
  input  drive_t [NX-1:0][W-1:0]      io_n_drv,
  output logic   [NY-1:0][W-1:0]      io_w_val,
  output logic   [NY-1:0][W-1:0]      io_e_val,
  output logic   [NX-1:0][W-1:0]      io_s_val,
  output logic   [NX-1:0][W-1:0]      io_n_val,
  // logic-block pins of tile y*NX + x
  input  logic   [NX*NY-1:0][NO-1:0]  lb_out,
  output logic   [NX*NY-1:0][NI-1:0][4*TPS-1:0] lb_in_cand,
  output logic                        conflict
);

  localparam drive_t NO_DRV = '{en: 1'b0, val: 1'b0};

  logic h_val [NX+1][NY][W];
  logic v_val [NX][NY+1][W];
  logic h_cf  [NX+1][NY][W];
  logic v_cf  [NX][NY+1][W];

  drive_t [3:0][W-1:0] core_drv [NX][NY];
  drive_t [3:0][W-1:0] byp_drv  [NX][NY];
  logic   [3:0][W-1:0] side_in  [NX][NY];
  logic   chain [NX*NY+1];

  assign chain[NX*NY] = cfg_in;
  assign cfg_out      = chain[0];

  // Tiles.
  for (genvar x = 0; x < NX; x++) begin : g_x
    for (genvar y = 0; y < NY; y++) begin : g_y
      localparam int unsigned K = y*NX + x;
      for (genvar t = 0; t < W; t++) begin : g_t
        assign side_in[x][y][SIDE_N][t] = v_val[x][y+1][t];
        assign side_in[x][y][SIDE_S][t] = v_val[x][y][t];
        assign side_in[x][y][SIDE_W][t] = h_val[x][y][t];
        assign side_in[x][y][SIDE_E][t] = h_val[x+1][y][t];
      end
      cra_routing_module #(.W(W), .D(D), .NI(NI), .NO(NO), .TPS(TPS), .NCFG(NCFG)) u_rm (
        .clk        (clk),
        .rst_n      (rst_n),
        .cfg_shift  (cfg_shift),
        .cfg_si     (chain[K+1]),
        .route_en   (route_en),
        .cfg_so     (chain[K]),
        .side_in    (side_in[x][y]),
        .lb_out     (lb_out[K]),
        .core_drv   (core_drv[x][y]),
        .byp_drv    (byp_drv[x][y]),
        .lb_in_cand (lb_in_cand[K])
      );
    end
  end

  // Horizontal shared wires: west neighbour's east side, east neighbour's
  // west side, or the I/O driver at the array edge.
  for (genvar x = 0; x <= NX; x++) begin : g_hx
    for (genvar y = 0; y < NY; y++) begin : g_hy
      for (genvar t = 0; t < W; t++) begin : g_ht
        drive_t [3:0] d;
        if (x == 0) begin : g_wedge
          assign d[0] = io_w_drv[y][t];
          assign d[1] = NO_DRV;
        end else begin : g_wnb
          assign d[0] = core_drv[x-1][y][SIDE_E][t];
          assign d[1] = byp_drv[x-1][y][SIDE_E][t];
        end
        if (x == NX) begin : g_eedge
          assign d[2] = io_e_drv[y][t];
          assign d[3] = NO_DRV;
        end else begin : g_enb
          assign d[2] = core_drv[x][y][SIDE_W][t];
          assign d[3] = byp_drv[x][y][SIDE_W][t];
        end
        cra_wire_node #(.ND(4)) u_node (.drv(d), .val(h_val[x][y][t]), .conflict(h_cf[x][y][t]));
      end
    end
  end

  // Vertical shared wires.
  for (genvar x = 0; x < NX; x++) begin : g_vx
    for (genvar y = 0; y <= NY; y++) begin : g_vy
      for (genvar t = 0; t < W; t++) begin : g_vt
        drive_t [3:0] d;
        if (y == 0) begin : g_sedge
          assign d[0] = io_s_drv[x][t];
          assign d[1] = NO_DRV;
        end else begin : g_snb
          assign d[0] = core_drv[x][y-1][SIDE_N][t];
          assign d[1] = byp_drv[x][y-1][SIDE_N][t];
        end
        if (y == NY) begin : g_nedge
          assign d[2] = io_n_drv[x][t];
          assign d[3] = NO_DRV;
        end else begin : g_nnb
          assign d[2] = core_drv[x][y][SIDE_S][t];
          assign d[3] = byp_drv[x][y][SIDE_S][t];
        end
        cra_wire_node #(.ND(4)) u_node (.drv(d), .val(v_val[x][y][t]), .conflict(v_cf[x][y][t]));
      end
    end
  end

  // Edge wire values.
  for (genvar y = 0; y < NY; y++) begin : g_ioy
    for (genvar t = 0; t < W; t++) begin : g_t
      assign io_w_val[y][t] = h_val[0][y][t];
      assign io_e_val[y][t] = h_val[NX][y][t];
    end
  end
  for (genvar x = 0; x < NX; x++) begin : g_iox
    for (genvar t = 0; t < W; t++) begin : g_t
      assign io_s_val[x][t] = v_val[x][0][t];
      assign io_n_val[x][t] = v_val[x][NY][t];
    end
  end

  // Any wire with more than one driver.
  always_comb begin
    conflict = 1'b0;
    for (int x = 0; x <= NX; x++)
      for (int y = 0; y < NY; y++)
        for (int t = 0; t < int'(W); t++)
          conflict = conflict | h_cf[x][y][t];
    for (int x = 0; x < NX; x++)
      for (int y = 0; y <= NY; y++)
        for (int t = 0; t < int'(W); t++)
          conflict = conflict | v_cf[x][y][t];
  end

endmodule
