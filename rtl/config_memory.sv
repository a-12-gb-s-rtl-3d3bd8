// Configuration memory of the gate array: one cell_cfg_t word per cell.
//
// The configuration bits set every multiplexer selection, the FU modes and
// every current-tree enable of the array; switching a tree off is done by
// writing zeros to its bits. Reset loads INIT, the design the chip is meant
// to power up as (the default is an array with every cell switched off).
// One word is written per clock through a simple synchronous write port:
// when we is high at a rising edge, word waddr takes wdata and the array sees
// the new configuration from the next cycle on. cfg presents all words in
// parallel, index r*COLS + c for cell (r, c).
// The original keeps configuration in CMOS memory bits whose loading is not
// described; the register file and its write port are this design's choice.
module config_memory
  import fpga_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 2,
  parameter cell_cfg_t [ROWS*COLS-1:0] INIT = '0
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                we,
  input  logic [$clog2(ROWS*COLS)-1:0]        waddr,
  input  cell_cfg_t                           wdata,
  output cell_cfg_t [ROWS*COLS-1:0]           cfg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  cfg <= INIT;
    else if (we) cfg[waddr] <= wdata;
  end

  // A write must address an existing cell.
  always_ff @(posedge clk) begin
    if (rst_n && we)
      assert (int'(waddr) < ROWS * COLS)
        else $error("config_memory: write to cell %0d of %0d", waddr, ROWS * COLS);
  end

endmodule
