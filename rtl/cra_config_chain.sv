// cra_config_chain: configuration memory of one CRA tile, loaded serially.
//
// Holds the N configuration bits of a tile's routing resources (MUX
// selects, pass switches, bypass buffers; 1440 bits at W = 72, d = 3). The
// bits form a shift register so that tiles can be daisy-chained into one
// configuration chain: while shift is high, each rising clock edge moves
// every bit one place towards bit 0, bit N-1 takes si, and so shows bit 0
// before the edge. After N shifts the first bit sent sits in bit 0. The
// document counts the bits; the serial loading scheme and the active-low
// asynchronous clear (all routing switches off) are this design's choice.
module cra_config_chain #(
  parameter int unsigned N = 1440
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous clear, active low
  input  logic         shift,   // shift enable
  input  logic         si,      // serial in
  output logic         so,      // serial out (bit 0)
  output logic [N-1:0] q        // configuration bits
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (shift) q <= {si, q[N-1:1]};
  end

  assign so = q[0];

endmodule
