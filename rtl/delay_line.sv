// delay_line: the chain of sample registers of a direct-form filter.
//
// taps[0] holds the sample accepted one step ago, taps[1] the one before, and
// so on up to taps[DEPTH-1].  On a clock edge with en high the chain advances
// by one step and din enters taps[0]; with en low it holds.  The filter uses
// one chain for past inputs u(k-1..k-NB) and one for past extended-precision
// outputs y~(k-1..k-NA).
//
// Interface: clk, rst_n (asynchronous, active low, clears every tap to zero,
// which is the filter's rest state), en, din (W bits), taps[0..DEPTH-1].
// Timing: taps change one clock edge after en is sampled high.
// The register chain is the filter structure itself; the enable and the reset
// value are this design's choice.
module delay_line #(
  parameter int W     = 12,
  parameter int DEPTH = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] taps [DEPTH]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < DEPTH; j++) taps[j] <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int j = 1; j < DEPTH; j++) taps[j] <= taps[j-1];
    end
  end
endmodule
