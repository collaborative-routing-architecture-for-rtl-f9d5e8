// tb_cra_config_chain: loads one tile's 1440 configuration bits and checks
// that the chain clears on reset, holds while shift is low, holds exactly
// the sent vector after 1440 shift cycles (bit 0 sent first), and streams
// the same bits out of so in order on the next 1440 shifts.
module tb_cra_config_chain;
  localparam int N = 1440;

  logic clk = 0, rst_n = 0, shift = 0, si = 0, so;
  logic [N-1:0] q, ref_v;
  int checks = 0, failures = 0, cycles = 0;

  cra_config_chain #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .shift(shift), .si(si), .so(so), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start, loaded;
    for (int i = 0; i < N; i++) ref_v[i] = 1'($urandom);
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    rst_n = 1;
    @(negedge clk);
    start = cycles;
    shift = 1;
    for (int i = 0; i < N; i++) begin
      si = ref_v[i];
      @(negedge clk);
    end
    shift = 0;
    loaded = cycles - start;
    checks++;
    if (loaded != N) begin failures++; $display("FAIL load took %0d cycles, expected %0d", loaded, N); end
    checks++;
    if (q !== ref_v) begin failures++; $display("FAIL loaded vector differs"); end
    repeat (5) @(negedge clk);
    checks++;
    if (q !== ref_v) begin failures++; $display("FAIL chain moved while shift low"); end
    // Read back through so.
    shift = 1;
    si = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (so !== ref_v[i]) begin
        failures++;
        if (failures < 10) $display("FAIL readback bit %0d", i);
      end
      @(negedge clk);
    end
    shift = 0;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL chain not empty after readback"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
