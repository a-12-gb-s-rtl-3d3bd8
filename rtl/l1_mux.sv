// Two-level L1 input multiplexer of the basic cell (16:1 or 17:1).
//
// A single-level 16:1 CML multiplexer is slower than a two-level one, so the
// 16 cell inputs are grouped by direction into four 4:1 front-end
// multiplexers (front d takes the comb, seq and redir signals of the
// neighbour in direction d and that direction's FastLANE), and a back-end
// multiplexer picks one front. With FEEDBACK = 1 the back end is 5:1 and its
// fifth input is the cell's own latch output, making a 17:1 multiplexer.
// All five sub-multiplexers are one-hot onehot_mux instances and switch off
// when their selection bits are zero; trees_on counts the ones that are on.
// Purely combinational.
// The two-level structure and the 16/17 inputs follow the original cell;
// grouping the front ends by direction and feeding the latch in at the back
// end are this design's choices.
module l1_mux
  import fpga_pkg::*;
#(
  parameter bit FEEDBACK = 1'b1
) (
  input  logic [L1_INPUTS-1:0] d,        // index 4*dir + k, see fpga_pkg
  input  logic                 fb,       // latch feedback (used when FEEDBACK)
  input  l1_cfg_t              cfg,
  output logic                 y,
  output logic [2:0]           trees_on  // number of sub-multiplexers switched on
);

  logic [NDIR-1:0] front_y, front_on;
  logic            back_on;

  for (genvar g = 0; g < NDIR; g++) begin : g_front
    onehot_mux #(.N(4)) u_front (
      .d      (d[4*g +: 4]),
      .sel    (cfg.front[g]),
      .y      (front_y[g]),
      .tree_on(front_on[g])
    );
  end

  if (FEEDBACK) begin : g_back17
    onehot_mux #(.N(5)) u_back (
      .d      ({fb, front_y}),
      .sel    (cfg.back),
      .y      (y),
      .tree_on(back_on)
    );
  end else begin : g_back16
    onehot_mux #(.N(4)) u_back (
      .d      (front_y),
      .sel    (cfg.back[3:0]),
      .y      (y),
      .tree_on(back_on)
    );
  end

  always_comb begin
    trees_on = 3'(back_on);
    for (int i = 0; i < NDIR; i++) trees_on += 3'(front_on[i]);
  end

endmodule
