// tb_cra_bypass: random check of the bypass interconnects at W = 72.
// For every track each of the four buffers must drive the opposite side's
// value when enabled and be high-Z (en = 0) when not.
module tb_cra_bypass;
  import cra_pkg::*;
  localparam int W = 72;

  logic   [3:0][W-1:0] side_in;
  logic   [4*W-1:0]    cfg;
  drive_t [3:0][W-1:0] byp_drv;
  int checks = 0, failures = 0;

  cra_bypass dut (.side_in(side_in), .cfg(cfg), .byp_drv(byp_drv));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_drv(input int s, input int t, input logic en, input logic v);
    checks++;
    if (byp_drv[s][t].en !== en || (en && byp_drv[s][t].val !== v)) begin
      failures++;
      $display("FAIL side %0d track %0d: got en=%b val=%b, expected en=%b val=%b",
               s, t, byp_drv[s][t].en, byp_drv[s][t].val, en, v);
    end
  endtask

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < W; t++) side_in[s][t] = 1'($urandom);
      for (int b = 0; b < 4*W; b++) cfg[b] = 1'($urandom);
      #1;
      for (int t = 0; t < W; t++) begin
        expect_drv(1, t, cfg[t],       side_in[3][t]);  // west -> east
        expect_drv(3, t, cfg[W+t],     side_in[1][t]);  // east -> west
        expect_drv(0, t, cfg[2*W+t],   side_in[2][t]);  // south -> north
        expect_drv(2, t, cfg[3*W+t],   side_in[0][t]);  // north -> south
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
