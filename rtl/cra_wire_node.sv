// cra_wire_node: one shared wire between neighbouring CRA routing modules.
//
// Every track at a module boundary is one wire that both neighbours can
// drive: each neighbour's switching core through a pass switch, and each
// neighbour's bypass buffer; at the array edge an I/O driver takes the
// place of the missing neighbour. Tri-state drivers are modelled with two
// values: the wire carries the OR of the enabled drivers' values and is 0
// when nothing drives it. A valid configuration enables at most one driver;
// conflict flags a wire with more than one. Combinational; no clock.
module cra_wire_node
  import cra_pkg::*;
#(
  parameter int unsigned ND = 4
) (
  input  drive_t [ND-1:0] drv,       // the wire's tri-state drivers
  output logic            val,       // wire value
  output logic            conflict   // more than one driver enabled
);

  always_comb begin
    int unsigned n_en;
    val  = 1'b0;
    n_en = 0;
    for (int i = 0; i < ND; i++) begin
      val  = val | (drv[i].en & drv[i].val);
      n_en = n_en + 32'(drv[i].en);
    end
    conflict = (n_en > 1);
  end

endmodule
