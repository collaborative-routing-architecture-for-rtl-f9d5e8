// cra_core_mux: one MUX of the CRA switching core.
//
// The MUX has d + 1 data inputs: d switching inputs taken from core lines
// of the perpendicular sides, and one output pin of the associated logic
// block. Its select field has d + 2 patterns: one per input and one that
// leaves the output in high-Z. With the published d = 3 this is a 4-input
// MUX with 3 configuration bits and 5 patterns, as in the source design.
//
// A high-Z output is modelled as drv.en = 0 (drv.val is then 0). Encoding,
// which is this design's choice: sel = 0 high-Z, sel = k+1 switching input
// k, sel = d+1 the logic-block output, higher codes also high-Z, so a
// cleared configuration leaves every MUX undriven.
//
// Purely combinational; no clock.
module cra_core_mux
  import cra_pkg::*;
#(
  parameter int unsigned D  = D_DEFAULT,
  parameter int unsigned SW = sel_width(D)
) (
  input  logic [D-1:0]  sw_in,   // switching inputs
  input  logic          lb_in,   // logic-block output pin
  input  logic [SW-1:0] sel,     // configuration bits
  output drive_t        drv      // output and its enable
);

  always_comb begin
    drv = '{en: 1'b0, val: 1'b0};
    for (int unsigned k = 0; k < D; k++) begin
      if (sel == SW'(k + 1)) begin
        drv.en  = 1'b1;
        drv.val = sw_in[k];
      end
    end
    if (sel == SW'(D + 1)) begin
      drv.en  = 1'b1;
      drv.val = lb_in;
    end
  end

endmodule
