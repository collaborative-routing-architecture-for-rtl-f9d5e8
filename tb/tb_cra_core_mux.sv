// tb_cra_core_mux: exhaustive check of the switching-core MUX at d = 3.
// Every select code (0..7) is tried with every switching-input pattern and
// both logic-block pin values. Expected: code 0 and codes 5..7 high-Z,
// codes 1..3 pass switching input 0..2, code 4 passes the logic-block pin.
module tb_cra_core_mux;
  import cra_pkg::*;

  logic [2:0] sw_in;
  logic       lb_in;
  logic [2:0] sel;
  drive_t     drv;
  int checks = 0, failures = 0;

  cra_core_mux dut (.sw_in(sw_in), .lb_in(lb_in), .sel(sel), .drv(drv));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_en, exp_val;
    int n_patterns;
    n_patterns = 0;
    for (int s = 0; s < 8; s++) begin
      logic any_en;
      any_en = 1'b0;
      for (int i = 0; i < 8; i++) begin
        for (int l = 0; l < 2; l++) begin
          sel = 3'(s); sw_in = 3'(i); lb_in = 1'(l);
          #1;
          case (s)
            1: begin exp_en = 1; exp_val = sw_in[0]; end
            2: begin exp_en = 1; exp_val = sw_in[1]; end
            3: begin exp_en = 1; exp_val = sw_in[2]; end
            4: begin exp_en = 1; exp_val = lb_in;    end
            default: begin exp_en = 0; exp_val = 0; end
          endcase
          checks++;
          if (drv.en !== exp_en || drv.val !== exp_val) begin
            failures++;
            $display("FAIL sel=%0d sw=%b lb=%b: got en=%b val=%b", s, sw_in, lb_in, drv.en, drv.val);
          end
          any_en |= drv.en;
        end
      end
      if (any_en) n_patterns++;
    end
    // Four selecting patterns plus high-Z: five in use.
    checks++;
    if (n_patterns != 4) begin
      failures++;
      $display("FAIL expected 4 driving select patterns, saw %0d", n_patterns);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
