// Redirection multiplexer (9:1) of the basic cell for one output direction.
//
// It relays a signal from one neighbour to the neighbour in direction DIR
// without passing through the function unit. Its nine inputs are the three
// signals {comb, seq, redir} of each of the three other neighbours, in
// increasing direction order with DIR skipped (fpga_pkg::redir_index gives
// the slot). The selection is one-hot; all zero switches the multiplexer off.
// Purely combinational.
// Four 9:1 redirection multiplexers per cell follow the original cell; the
// input order is this design's choice.
module redirect_mux
  import fpga_pkg::*;
#(
  parameter int unsigned DIR = 0
) (
  input  logic [NDIR-1:0][NBUNDLE-1:0] nbr,      // bundles from the four neighbours
  input  logic [REDIR_INS-1:0]         sel,      // one-hot selection
  output logic                         y,
  output logic                         tree_on
);

  logic [REDIR_INS-1:0] ins;

  always_comb begin
    ins = '0;
    for (int dd = 0; dd < NDIR; dd++) begin
      if (dd != int'(DIR)) begin
        for (int k = 0; k < NBUNDLE; k++)
          ins[redir_index(DIR, dd, k)] = nbr[dd][k];
      end
    end
  end

  onehot_mux #(.N(REDIR_INS)) u_mux (
    .d      (ins),
    .sel    (sel),
    .y      (y),
    .tree_on(tree_on)
  );

endmodule
