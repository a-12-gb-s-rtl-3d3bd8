// ROWS x COLS array of BCII basic cells with nearest-neighbour routing.
//
// Cell (r, c) sits in row r (row 0 at the north edge) and column c (column 0
// at the west edge). Each cell exchanges a 3-signal bundle {redir, seq, comb}
// with each of its four neighbours. Bundles at the array edge come from and
// go to the *_in / *_out ports (the pads of a chip). Each column has two
// FastLANE lines, seen by its cells from the north (col_fl[c][0]) and from
// the south (col_fl[c][1]); each row has two, seen from the east
// (row_fl[r][0]) and the west (row_fl[r][1]).
//
// cfg[r*COLS + c] configures cell (r, c). trees_on adds up the current
// trees that are on in all cells; a cell whose configuration is all zero is
// switched off completely and adds nothing.
//
// The neighbour connections form combinational paths in both directions
// between adjacent cells, so the netlist holds structural loops; a valid
// configuration never closes one (as in any FPGA fabric), which is why the
// loop warnings a linter gives on this module are left standing.
// Timing: as bcii_cell; one clock for all latches.
// The 3-signal neighbour links follow the original cell; the FastLANE layout
// (two lines per row and per column) is this design's choice.
module gate_array
  import fpga_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 2
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  cell_cfg_t [ROWS*COLS-1:0]              cfg,
  input  logic [COLS-1:0][1:0]                   col_fl,
  input  logic [ROWS-1:0][1:0]                   row_fl,
  input  logic [COLS-1:0][NBUNDLE-1:0]           north_in,
  input  logic [COLS-1:0][NBUNDLE-1:0]           south_in,
  input  logic [ROWS-1:0][NBUNDLE-1:0]           east_in,
  input  logic [ROWS-1:0][NBUNDLE-1:0]           west_in,
  output logic [COLS-1:0][NBUNDLE-1:0]           north_out,
  output logic [COLS-1:0][NBUNDLE-1:0]           south_out,
  output logic [ROWS-1:0][NBUNDLE-1:0]           east_out,
  output logic [ROWS-1:0][NBUNDLE-1:0]           west_out,
  output logic [15:0]                            trees_on
);

  typedef logic [NDIR-1:0][NBUNDLE-1:0] bundles_t;

  bundles_t        cell_in  [ROWS][COLS];
  bundles_t        cell_out [ROWS][COLS];
  logic [NDIR-1:0] cell_fl  [ROWS][COLS];
  logic [5:0]      cell_on  [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // Neighbour inputs, from the adjacent cell or from the edge.
      if (r == 0) begin : g_n_edge
        assign cell_in[r][c][DIR_N] = north_in[c];
      end else begin : g_n_cell
        assign cell_in[r][c][DIR_N] = cell_out[r-1][c][DIR_S];
      end
      if (r == ROWS - 1) begin : g_s_edge
        assign cell_in[r][c][DIR_S] = south_in[c];
      end else begin : g_s_cell
        assign cell_in[r][c][DIR_S] = cell_out[r+1][c][DIR_N];
      end
      if (c == COLS - 1) begin : g_e_edge
        assign cell_in[r][c][DIR_E] = east_in[r];
      end else begin : g_e_cell
        assign cell_in[r][c][DIR_E] = cell_out[r][c+1][DIR_W];
      end
      if (c == 0) begin : g_w_edge
        assign cell_in[r][c][DIR_W] = west_in[r];
      end else begin : g_w_cell
        assign cell_in[r][c][DIR_W] = cell_out[r][c-1][DIR_E];
      end

      assign cell_fl[r][c] = {row_fl[r][1], col_fl[c][1], row_fl[r][0], col_fl[c][0]}; // W,S,E,N

      bcii_cell u_cell (
        .clk     (clk),
        .rst_n   (rst_n),
        .cfg     (cfg[r*COLS + c]),
        .nbr_in  (cell_in[r][c]),
        .fl_in   (cell_fl[r][c]),
        .nbr_out (cell_out[r][c]),
        .trees_on(cell_on[r][c])
      );

      // Edge outputs.
      if (r == 0) begin : g_n_out
        assign north_out[c] = cell_out[r][c][DIR_N];
      end
      if (r == ROWS - 1) begin : g_s_out
        assign south_out[c] = cell_out[r][c][DIR_S];
      end
      if (c == COLS - 1) begin : g_e_out
        assign east_out[r] = cell_out[r][c][DIR_E];
      end
      if (c == 0) begin : g_w_out
        assign west_out[r] = cell_out[r][c][DIR_W];
      end
    end
  end

  always_comb begin
    trees_on = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        trees_on += 16'(cell_on[r][c]);
  end

endmodule
