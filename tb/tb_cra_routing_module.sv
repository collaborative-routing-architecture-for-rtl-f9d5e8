// tb_cra_routing_module: one routing module at its default size (W = 72,
// d = 3, 1440 configuration bits). The configuration is shifted in (and
// must take exactly 1440 cycles), then the module must:
//   * carry west track 3 straight to east track 3 on a bypass buffer,
//   * turn west track 10 onto north track 10 through the core,
//   * put logic-block output 2 onto south track 6,
//   * show incoming west track 4 on logic-block input 0, tap 0,
//   * drive nothing that was not configured,
//   * drive nothing at all while route_en is low.
// Finally the configuration is read back through cfg_so.
module tb_cra_routing_module;
  import cra_pkg::*;
  localparam int W = 72, SW = 3, NCFG = 1440, TPS = 4;
  localparam int N = 0, E = 1, S = 2, WS = 3;

  logic clk = 0, rst_n = 0, cfg_shift = 0, cfg_si = 0, cfg_so, route_en = 0;
  logic   [3:0][W-1:0]     side_in;
  logic   [3:0]            lb_out;
  drive_t [3:0][W-1:0]     core_drv, byp_drv;
  logic   [15:0][4*TPS-1:0] lb_in_cand;
  logic   [NCFG-1:0]       cfgv;
  int checks = 0, failures = 0, cycles = 0;

  cra_routing_module dut (.clk(clk), .rst_n(rst_n), .cfg_shift(cfg_shift), .cfg_si(cfg_si),
                          .route_en(route_en),
                          .cfg_so(cfg_so), .side_in(side_in), .lb_out(lb_out),
                          .core_drv(core_drv), .byp_drv(byp_drv), .lb_in_cand(lb_in_cand));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  function automatic int n_enabled();
    int n = 0;
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < W; t++) n += int'(core_drv[s][t].en) + int'(byp_drv[s][t].en);
    return n;
  endfunction

  initial begin
    int start;
    side_in = '0; lb_out = '0;
    cfgv = '0;
    // Bypass west -> east, track 3: bypass bit 0*W + 3.
    cfgv[4*W*(SW+1) + 3] = 1'b1;
    // Turn W10 -> N10: N MUX 10 code 1 (side A of N = W), pass W10, pass N10.
    cfgv[(N*W + 10)*SW +: SW] = 3'd1;
    cfgv[4*W*SW + WS*W + 10] = 1'b1;
    cfgv[4*W*SW + N*W + 10] = 1'b1;
    // LB output 2 -> S6: S MUX 6 code 4, pass S6.
    cfgv[(S*W + 6)*SW +: SW] = 3'd4;
    cfgv[4*W*SW + S*W + 6] = 1'b1;
    // LB input 0 from W4: pass W4.
    cfgv[4*W*SW + WS*W + 4] = 1'b1;

    repeat (2) @(negedge clk);
    #1;
    check("nothing driven after reset", n_enabled() == 0, 1'b1);
    rst_n = 1;
    @(negedge clk);
    start = cycles;
    cfg_shift = 1;
    for (int i = 0; i < NCFG; i++) begin
      cfg_si = cfgv[i];
      @(negedge clk);
    end
    cfg_shift = 0;
    checks++;
    if (cycles - start != NCFG) begin
      failures++;
      $display("FAIL configuration took %0d cycles", cycles - start);
    end
    #1;
    check("nothing driven while route_en is low", n_enabled() == 0, 1'b1);
    route_en = 1;
    #1;
    check("exactly the configured drivers", n_enabled() == 3, 1'b1);

    for (int v = 0; v < 2; v++) begin
      side_in = '0; lb_out = '0;
      side_in[WS][3] = 1'(v);
      side_in[WS][10] = 1'(v);
      side_in[WS][4] = 1'(v);
      lb_out[2] = 1'(v);
      #1;
      check("bypass en", byp_drv[E][3].en, 1'b1);
      check("bypass val", byp_drv[E][3].val, 1'(v));
      check("turn en", core_drv[N][10].en, 1'b1);
      check("turn val", core_drv[N][10].val, 1'(v));
      check("lb out en", core_drv[S][6].en, 1'b1);
      check("lb out val", core_drv[S][6].val, 1'(v));
      check("lb in tap", lb_in_cand[0][WS*TPS + 0], 1'(v));
      @(negedge clk);
    end

    // Read the configuration back.
    cfg_shift = 1;
    for (int i = 0; i < NCFG; i++) begin
      checks++;
      if (cfg_so !== cfgv[i]) begin
        failures++;
        if (failures < 10) $display("FAIL readback bit %0d", i);
      end
      cfg_si = 1'b0;
      @(negedge clk);
    end
    cfg_shift = 0;
    #1;
    check("cleared after readback", n_enabled() == 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
