// Two-bit counter that drives the DEMUX channel decoder.
//
// Signal B toggles on every clock edge; signal A is B divided by two, so A
// has half the frequency of B and {A, B} counts 00, 01, 10, 11 and repeats.
// Each count selects one DEMUX channel for one clock cycle.
// Timing: both outputs change at the rising clock edge; reset gives 00.
// The original derives A from B with a frequency divider; making B a
// divide-by-two of the system clock and placing the counter beside the gate
// array are this design's choices.
module freq_divider (
  input  logic clk,
  input  logic rst_n,
  output logic a,   // MSB, clock / 4
  output logic b    // LSB, clock / 2
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= 1'b0;
      b <= 1'b0;
    end else begin
      b <= ~b;
      a <= a ^ b;   // toggles when B falls
    end
  end

endmodule
