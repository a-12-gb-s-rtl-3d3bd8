// Behavioural model of the feed-forward interpolated VCO (FFI-VCO) that
// makes the system clock. Not synthesizable: it stands for an analog ring
// oscillator and uses delays.
//
// The oscillator is a ring of four differential buffers. Each buffer mixes
// the output of the buffer before it with that of the buffer two places
// before it; the control sets the mix. Weighting the nearer input fully makes
// a four-stage ring, weighting the farther one fully makes the ring behave
// as a two-stage ring, and settings in between give a frequency in between.
// The model computes the period from that picture:
//   f(w) = f4 + (f2 - f4) * w / 255,  f4 = 1 / (8 * TD_FS),  f2 = 1 / (4 * TD_FS)
// where w = vctrl (0 = four-stage, 255 = two-stage) and TD_FS is the buffer
// delay in femtoseconds. The default TD_FS = 18750 fs puts the mid-scale
// frequency at 10 GHz (range about 6.7 to 13.3 GHz).
// Interface: en starts and stops the oscillation (clk held low when off);
// a new vctrl takes effect from the next half period.
module ffi_vco #(
  parameter int unsigned TD_FS = 18750   // buffer delay in fs
) (
  input  logic       en,
  input  logic [7:0] vctrl,
  output logic       clk
);
  timeunit 1fs;
  timeprecision 1fs;

  // Half period in fs for control word w (integer arithmetic, rounded).
  function automatic longint unsigned half_period_fs(input logic [7:0] w);
    longint unsigned num, den;
    // f = (255 + w) / (255 * 8 * TD)  ->  T/2 = 255 * 4 * TD / (255 + w)
    num = 64'd255 * 64'd4 * 64'(TD_FS);
    den = 64'd255 + 64'(w);
    return (num + den / 2) / den;
  endfunction

  initial clk = 1'b0;

  always begin
    if (en) begin
      #(half_period_fs(vctrl));
      clk = ~clk;
    end else begin
      clk = 1'b0;
      @(posedge en);
    end
  end

endmodule
