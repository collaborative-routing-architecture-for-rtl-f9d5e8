// tb_cra_wire_node: random check of the shared-wire resolver with four
// drivers. Expected value: OR of enabled drivers (0 when none drives);
// conflict when two or more are enabled. Every driver count 0..4 is seen.
module tb_cra_wire_node;
  import cra_pkg::*;

  drive_t [3:0] drv;
  logic val, conflict;
  int checks = 0, failures = 0;
  int seen [5];

  cra_wire_node #(.ND(4)) dut (.drv(drv), .val(val), .conflict(conflict));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) seen[i] = 0;
    for (int it = 0; it < 2000; it++) begin
      int n; logic ev;
      drv = 8'($urandom);
      #1;
      n = 0; ev = 0;
      for (int i = 0; i < 4; i++) begin
        if (drv[i].en) begin n++; ev = ev | drv[i].val; end
      end
      seen[n]++;
      checks++;
      if (val !== ev || conflict !== (n > 1)) begin
        failures++;
        $display("FAIL drv=%b: got val=%b conflict=%b, expected %b %b", drv, val, conflict, ev, n > 1);
      end
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL no case with %0d drivers", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
