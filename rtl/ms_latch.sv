// Master-slave latch of the basic cell: a positive-edge D flip-flop.
//
// Built as two level-sensitive CML latches in the original; here it is
// written as an edge-triggered register, which is what the master-slave pair
// does. When its current tree is off (on = 0) it neither loads nor drives:
// q reads 0 and the stored value is cleared. rst_n clears it asynchronously.
// Timing: q takes d one clock edge after d is presented.
// Clearing the latch while it is switched off is this design's choice.
module ms_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic on,     // current tree enable from configuration
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= 1'b0;
    else if (!on) q <= 1'b0;
    else          q <= d;
  end

endmodule
