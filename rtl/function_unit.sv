// Function unit (FU) of the basic cell: one 2:1 multiplexer.
//
// The FU output is  y = c ? B : A,  where A and B are the L1 outputs a and b,
// each passed, inverted or replaced by a constant as its mode bits say.
// With these few options one multiplexer yields every two-input AND/OR-type
// function (with optional inversions), a plain 2:1 multiplexer, and, with the
// latch output fed back on a or b, a select-and-hold or toggle element.
// When fu_on is low the FU's current tree is off and y reads 0.
// Purely combinational.
// The original cell is only said to use a multiplexer as its function unit;
// the pass/invert/constant input conditioning is this design's choice.
module function_unit
  import fpga_pkg::*;
(
  input  logic     a,       // data input chosen when c = 0
  input  logic     b,       // data input chosen when c = 1
  input  logic     c,       // select
  input  fu_mode_e a_mode,
  input  fu_mode_e b_mode,
  input  logic     fu_on,   // current tree enable
  output logic     y
);

  function automatic logic condition(input logic x, input fu_mode_e m);
    unique case (m)
      FU_PASS: return x;
      FU_INV:  return ~x;
      FU_ZERO: return 1'b0;
      default: return 1'b1;
    endcase
  endfunction

  logic aa, bb;

  always_comb begin
    aa = condition(a, a_mode);
    bb = condition(b, b_mode);
    y  = fu_on & (c ? bb : aa);
  end

endmodule
