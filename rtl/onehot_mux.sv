// One-level selection-tree multiplexer with a one-hot select (N:1).
//
// Each input has its own differential pair in the CML original, switched by
// its own selection bit, so N need not be a power of two (the fabric uses
// 4:1, 5:1 and 9:1 instances). The current tree is enabled by the OR of the
// selection bits: with every bit at zero the multiplexer is off, its output
// reads 0 and tree_on is low. Selection bits come from configuration memory
// and are meant to be one-hot; an assertion flags two bits set at once.
// Purely combinational.
// This follows the original multiplexer; reading 0 when off is a modelling
// choice (a CML tree with no current has no defined output).
module onehot_mux #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] d,        // data inputs
  input  logic [N-1:0] sel,      // one-hot selection bits, all zero = off
  output logic         y,        // selected input, 0 when off
  output logic         tree_on   // current tree enable (OR of sel)
);

  always_comb begin
    tree_on = |sel;
    y       = |(d & sel);
  end

  // Configuration rule: at most one selection bit may be set.
  always_comb begin
    assert ($onehot0(sel))
      else $error("onehot_mux: more than one selection bit set: %b", sel);
  end

endmodule
