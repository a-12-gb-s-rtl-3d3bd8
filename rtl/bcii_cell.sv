// Improved basic cell (BCII) of the multiplexer-based FPGA.
//
// Datapath: three two-level L1 multiplexers pick the FU inputs a, b (17:1,
// with the latch fed back) and c (16:1) from the 12 neighbour signals and 4
// FastLANE inputs. The function unit computes y = c ? B : A. y is sent to
// every neighbour directly (comb) and through the master-slave latch (seq).
// Four 9:1 redirection multiplexers relay neighbour signals unchanged (redir).
// So each neighbour receives three signals from this cell instead of one, and
// a signal crosses three multiplexers (two L1 levels and the FU) per cell.
//
// Power (multimode routing): every multiplexer, the FU, the latch and each
// output driver is a CML current tree that configuration can switch off.
// A multiplexer is on when any of its selection bits is set; the FU and the
// latch have their own enable bits; the comb and seq drivers have one enable
// per direction. A switched-off part drives 0. trees_on counts the trees
// that are on, as a measure of the cell's static current.
//
// Interface: nbr_in[d] is the bundle {redir, seq, comb} received from the
// neighbour in direction d, fl_in[d] the FastLANE seen from direction d;
// nbr_out[d] is the bundle sent to the neighbour in direction d.
// Timing: comb follows the inputs within the cycle; seq changes at the rising
// clock edge; rst_n clears the latch asynchronously.
// The structure follows the original cell; the enable bits of the FU, the
// latch and the drivers, and a switched-off part reading 0, are this
// design's choices.
module bcii_cell
  import fpga_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  cell_cfg_t                    cfg,
  input  logic [NDIR-1:0][NBUNDLE-1:0] nbr_in,
  input  logic [NDIR-1:0]              fl_in,
  output logic [NDIR-1:0][NBUNDLE-1:0] nbr_out,
  output logic [5:0]                   trees_on
);

  logic [L1_INPUTS-1:0] l1_d;
  logic                 a, b, c, y, q;
  logic [2:0]           on_a, on_b, on_c;
  logic [NDIR-1:0]      redir_y, redir_on;

  // L1 input vector: per direction {FastLANE, redir, seq, comb}.
  always_comb begin
    for (int dd = 0; dd < NDIR; dd++)
      l1_d[4*dd +: 4] = {fl_in[dd], nbr_in[dd]};
  end

  l1_mux #(.FEEDBACK(1'b1)) u_l1a (.d(l1_d), .fb(q),    .cfg(cfg.l1a), .y(a), .trees_on(on_a));
  l1_mux #(.FEEDBACK(1'b1)) u_l1b (.d(l1_d), .fb(q),    .cfg(cfg.l1b), .y(b), .trees_on(on_b));
  l1_mux #(.FEEDBACK(1'b0)) u_l1c (.d(l1_d), .fb(1'b0), .cfg(cfg.l1c), .y(c), .trees_on(on_c));

  function_unit u_fu (
    .a     (a),
    .b     (b),
    .c     (c),
    .a_mode(cfg.a_mode),
    .b_mode(cfg.b_mode),
    .fu_on (cfg.fu_on),
    .y     (y)
  );

  ms_latch u_latch (
    .clk  (clk),
    .rst_n(rst_n),
    .on   (cfg.latch_on),
    .d    (y),
    .q    (q)
  );

  for (genvar g = 0; g < NDIR; g++) begin : g_redir
    redirect_mux #(.DIR(g)) u_redir (
      .nbr    (nbr_in),
      .sel    (cfg.redir_sel[g]),
      .y      (redir_y[g]),
      .tree_on(redir_on[g])
    );
  end

  // Output drivers.
  always_comb begin
    for (int dd = 0; dd < NDIR; dd++) begin
      nbr_out[dd][B_COMB]  = y & cfg.drv_comb[dd];
      nbr_out[dd][B_SEQ]   = q & cfg.drv_seq[dd];
      nbr_out[dd][B_REDIR] = redir_y[dd];
    end
  end

  always_comb begin
    trees_on = 6'(on_a) + 6'(on_b) + 6'(on_c) + 6'(cfg.fu_on) + 6'(cfg.latch_on);
    for (int dd = 0; dd < NDIR; dd++)
      trees_on += 6'(redir_on[dd]) + 6'(cfg.drv_comb[dd]) + 6'(cfg.drv_seq[dd]);
  end

endmodule
