// tb_cra_fabric: end-to-end test of the CRA fabric at its default size
// (4 x 4 tiles, W = 72, d = 3, 16 LB inputs, 4 LB outputs).
//
// The whole array is configured through the one shift chain (16 x 1440
// bits, checked to take exactly that many cycles), then each routing
// mechanism is exercised with the signal at 0 and at 1:
//   long     west edge row 1 track 10 -> four bypasses -> east edge; also
//            east -> west on row 3 track 20 and north -> south on
//            column 3 track 30
//   turn     west edge row 0 track 7 -> core of tile (0,0) turns north ->
//            three bypasses -> north edge column 0 track 7
//   extended west edge row 2 track 2 -> two bypasses -> tile (2,2) core,
//            three MUXes (N2, W1, S0) -> two bypasses -> south edge
//            column 2 track 0 (no direct switching point W2 -> S0)
//   lb_out   tile (3,3) LB output 1 -> east MUX 5 -> east edge row 3
//   lb_in    south edge column 1 track 7 -> tile (1,0) LB input 3
//   byp_lb   the long wire, read by tile (2,1)'s LB input 6 through its
//            east pass switch (a bypass feeding a neighbouring block)
//   hiz      unconfigured edge wires stay undriven
//   conflict a second driver on the long wire raises conflict
//   disabled with route_en low the configured paths carry nothing
//   readback the configuration comes back out of cfg_out (route_en low)
// Each mechanism is counted; one that never happened is a failure.
module tb_cra_fabric;
  import cra_pkg::*;
  localparam int NX = 4, NY = 4, W = 72, SW = 3, NCFG = 1440, TPS = 4, NT = NX*NY;
  localparam int N = 0, E = 1, S = 2, WS = 3;

  logic clk = 0, rst_n = 0, cfg_shift = 0, cfg_in = 0, cfg_out, route_en = 0;
  drive_t [NY-1:0][W-1:0] io_w_drv, io_e_drv;
  drive_t [NX-1:0][W-1:0] io_s_drv, io_n_drv;
  logic   [NY-1:0][W-1:0] io_w_val, io_e_val;
  logic   [NX-1:0][W-1:0] io_s_val, io_n_val;
  logic   [NT-1:0][3:0]   lb_out;
  logic   [NT-1:0][15:0][4*TPS-1:0] lb_in_cand;
  logic                   conflict;
  logic   [NT*NCFG-1:0]   cfgv;
  int checks = 0, failures = 0, cycles = 0;
  int n_long = 0, n_turn = 0, n_ext = 0, n_lbo = 0, n_lbi = 0, n_bypl = 0;
  int n_hiz = 0, n_conf = 0, n_rb = 0, n_dis = 0;

  cra_fabric dut (
    .clk(clk), .rst_n(rst_n), .cfg_shift(cfg_shift), .cfg_in(cfg_in), .cfg_out(cfg_out),
    .route_en(route_en),
    .io_w_drv(io_w_drv), .io_e_drv(io_e_drv), .io_s_drv(io_s_drv), .io_n_drv(io_n_drv),
    .io_w_val(io_w_val), .io_e_val(io_e_val), .io_s_val(io_s_val), .io_n_val(io_n_val),
    .lb_out(lb_out), .lb_in_cand(lb_in_cand), .conflict(conflict));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Configuration vector helpers; tile k = y*NX + x holds [k*NCFG +: NCFG].
  function automatic int base(input int x, input int y);
    return (y*NX + x) * NCFG;
  endfunction
  task automatic set_sel(input int x, input int y, input int s, input int t, input int code);
    cfgv[base(x, y) + (s*W + t)*SW +: SW] = SW'(code);
  endtask
  task automatic set_pass(input int x, input int y, input int s, input int t);
    cfgv[base(x, y) + 4*W*SW + s*W + t] = 1'b1;
  endtask
  task automatic set_byp(input int x, input int y, input int dir, input int t);
    cfgv[base(x, y) + 4*W*(SW+1) + dir*W + t] = 1'b1;
  endtask

  task automatic check(input string what, input logic got, input logic exp, ref int cnt);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end else cnt++;
  endtask

  initial begin
    int start;
    io_w_drv = '0; io_e_drv = '0; io_s_drv = '0; io_n_drv = '0; lb_out = '0;
    cfgv = '0;
    // long: row 1 track 10, bypass west->east in all four tiles.
    for (int x = 0; x < NX; x++) set_byp(x, 1, 0, 10);
    for (int x = 0; x < NX; x++) set_byp(x, 3, 1, 20);
    for (int y = 0; y < NY; y++) set_byp(3, y, 3, 30);
    // byp_lb: tile (2,1) east pass switch on track 10 (pin 10 = LB input 6).
    set_pass(2, 1, E, 10);
    // turn: tile (0,0) W7 -> N7, then bypass south->north in column 0.
    set_pass(0, 0, WS, 7); set_sel(0, 0, N, 7, 1); set_pass(0, 0, N, 7);
    for (int y = 1; y < NY; y++) set_byp(0, y, 2, 7);
    // extended: row 2 track 2 bypassed through tiles (0,2), (1,2), then
    // tile (2,2): N2 <- W2, W1 <- N2, S0 <- W1, out south; then bypass
    // north->south in tiles (2,1), (2,0) on track 0.
    set_byp(0, 2, 0, 2); set_byp(1, 2, 0, 2);
    set_pass(2, 2, WS, 2); set_sel(2, 2, N, 2, 1); set_sel(2, 2, WS, 1, 3);
    set_sel(2, 2, S, 0, 3); set_pass(2, 2, S, 0);
    set_byp(2, 1, 3, 0); set_byp(2, 0, 3, 0);
    // lb_out: tile (3,3) east MUX 5 selects LB output 5 mod 4 = 1.
    set_sel(3, 3, E, 5, 4); set_pass(3, 3, E, 5);
    // lb_in: tile (1,0) south pass switch on track 7 (pin 7 = LB input 3).
    set_pass(1, 0, S, 7);

    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = cycles;
    cfg_shift = 1;
    for (int i = 0; i < NT*NCFG; i++) begin
      cfg_in = cfgv[i];
      @(negedge clk);
    end
    cfg_shift = 0;
    checks++;
    if (cycles - start != NT*NCFG) begin
      failures++;
      $display("FAIL configuration took %0d cycles, expected %0d", cycles - start, NT*NCFG);
    end

    // Loaded but not yet enabled: nothing is routed.
    io_w_drv[1][10] = '{en: 1'b1, val: 1'b1};
    io_w_drv[0][7]  = '{en: 1'b1, val: 1'b1};
    lb_out[3*NX + 3][1] = 1'b1;
    #1;
    check("disabled long wire", io_e_val[1][10], 1'b0, n_dis);
    check("disabled turn", io_n_val[0][7], 1'b0, n_dis);
    check("disabled lb output", io_e_val[3][5], 1'b0, n_dis);
    route_en = 1;

    for (int v = 0; v < 2; v++) begin
      io_w_drv = '0; io_s_drv = '0; io_e_drv = '0; io_n_drv = '0; lb_out = '0;
      io_e_drv[3][20] = '{en: 1'b1, val: 1'(v)};
      io_n_drv[3][30] = '{en: 1'b1, val: 1'(v)};
      io_w_drv[1][10] = '{en: 1'b1, val: 1'(v)};
      io_w_drv[0][7]  = '{en: 1'b1, val: 1'(v)};
      io_w_drv[2][2]  = '{en: 1'b1, val: 1'(v)};
      io_s_drv[1][7]  = '{en: 1'b1, val: 1'(v)};
      lb_out[3*NX + 3][1] = 1'(v);
      #1;
      check("long wire", io_e_val[1][10], 1'(v), n_long);
      check("long wire westward", io_w_val[3][20], 1'(v), n_long);
      check("long wire southward", io_s_val[3][30], 1'(v), n_long);
      check("turn", io_n_val[0][7], 1'(v), n_turn);
      check("extended path", io_s_val[2][0], 1'(v), n_ext);
      check("lb output", io_e_val[3][5], 1'(v), n_lbo);
      check("lb input", lb_in_cand[0*NX + 1][3][S*TPS + 0], 1'(v), n_lbi);
      check("bypass to neighbour lb input", lb_in_cand[1*NX + 2][6][E*TPS + 0], 1'(v), n_bypl);
      // Unconfigured wires next to the used ones stay undriven.
      check("hiz north col 1", io_n_val[1][7], 1'b0, n_hiz);
      check("hiz east row 0", io_e_val[0][7], 1'b0, n_hiz);
      check("hiz south col 2 t2", io_s_val[2][2], 1'b0, n_hiz);
      check("hiz east row 2", io_e_val[2][2], 1'b0, n_hiz);
      check("no conflict", conflict, 1'b0, n_hiz);
      @(negedge clk);
    end

    // Second driver on the east end of the long wire.
    io_e_drv = '0; io_n_drv = '0;
    io_e_drv[1][10] = '{en: 1'b1, val: 1'b0};
    #1;
    check("conflict raised", conflict, 1'b1, n_conf);
    io_e_drv[1][10] = '0;
    #1;
    check("conflict cleared", conflict, 1'b0, n_conf);

    // Read the configuration back, routing disabled meanwhile.
    route_en = 0;
    cfg_shift = 1;
    cfg_in = 1'b0;
    for (int i = 0; i < NT*NCFG; i++) begin
      checks++;
      if (cfg_out !== cfgv[i]) begin
        failures++;
        if (failures < 10) $display("FAIL readback bit %0d", i);
      end else n_rb++;
      @(negedge clk);
    end
    cfg_shift = 0;

    $display("mechanisms: long=%0d turn=%0d extended=%0d lb_out=%0d lb_in=%0d bypass_to_lb=%0d hiz=%0d conflict=%0d disabled=%0d readback=%0d",
             n_long, n_turn, n_ext, n_lbo, n_lbi, n_bypl, n_hiz, n_conf, n_dis, n_rb);
    if (n_long == 0) failures++;
    if (n_turn == 0) failures++;
    if (n_ext == 0) failures++;
    if (n_lbo == 0) failures++;
    if (n_lbi == 0) failures++;
    if (n_bypl == 0) failures++;
    if (n_hiz == 0) failures++;
    if (n_conf == 0) failures++;
    if (n_dis == 0) failures++;
    if (n_rb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
