// 1:4 DEMUX test chip built from a 4 x 2 array of BCII FPGA cells.
//
// A VCO makes the system clock. A 4-bit LFSR turns out one pseudorandom bit
// per clock as the DEMUX input. A two-bit counter (B toggling every clock, A
// = B divided by two) feeds the left column of the gate array, configured as
// a 2:4 decoder, so exactly one of SEL1..SEL4 is high in each clock cycle, in
// the order 1, 2, 3, 4. The right column is configured as four select-hold
// circuits: channel k loads the LFSR bit at the clock edge that ends the
// cycle in which SELk is high and holds it for the next three cycles. Each
// channel therefore runs at a quarter of the clock rate and the four together
// carry the full input rate.
//
// The array's configuration memory powers up (on rst_n) with the DEMUX
// configuration of demux_cfg_pkg; cfg_we / cfg_waddr / cfg_wdata rewrite one
// cell's configuration per clock, e.g. to switch cells off.
//
// Timing, with t counted in system clock cycles after reset is released:
//   counter {A,B} = t mod 4, SEL(t mod 4 + 1) high during cycle t,
//   LFSR bit d(t) = t-th bit of 000111101011001 (period 15),
//   at the edge ending cycle t channel Z(t mod 4 + 1) takes d(t).
// sys_clk, lfsr_out and trig (LFSR state 0000) are brought out for
// measurement, as are the four SEL signals.
// The array, column roles, LFSR, decoder table and select-hold behaviour
// follow the original chip; the FastLANE routing of counter and data, the
// configuration write port and the trigger definition are this design's.
module demux_chip
  import fpga_pkg::*;
  import demux_cfg_pkg::*;
(
  input  logic                   rst_n,
  input  logic                   vco_en,
  input  logic [7:0]             vco_ctrl,
  input  logic                   cfg_we,
  input  logic [2:0]             cfg_waddr,
  input  cell_cfg_t              cfg_wdata,
  output logic                   sys_clk,
  output logic [3:0]             z,          // z[k] = channel Z(k+1)
  output logic [3:0]             sel,        // sel[k] = SEL(k+1)
  output logic                   lfsr_out,
  output logic                   trig,
  output logic [15:0]            trees_on    // current trees switched on in the array
);

  localparam int unsigned ROWS = DEMUX_ROWS;
  localparam int unsigned COLS = DEMUX_COLS;
  localparam cell_cfg_t [ROWS*COLS-1:0] CFG_DEMUX = demux_config();

  logic                         clk;
  logic                         cnt_a, cnt_b, data;
  cell_cfg_t [ROWS*COLS-1:0]    cfg;
  logic [COLS-1:0][1:0]         col_fl;
  logic [ROWS-1:0][NBUNDLE-1:0] east_out, west_out;
  logic [COLS-1:0][NBUNDLE-1:0] north_out, south_out;

  ffi_vco u_vco (
    .en   (vco_en),
    .vctrl(vco_ctrl),
    .clk  (clk)
  );

  lfsr4 u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .dout (data),
    .sync (trig)
  );

  freq_divider u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (cnt_a),
    .b    (cnt_b)
  );

  config_memory #(.ROWS(ROWS), .COLS(COLS), .INIT(CFG_DEMUX)) u_cfg (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (cfg_we),
    .waddr(cfg_waddr),
    .wdata(cfg_wdata),
    .cfg  (cfg)
  );

  // FastLANEs: column 0 carries A (north) and B (south), column 1 the data.
  always_comb begin
    col_fl       = '0;
    col_fl[0][0] = cnt_a;
    col_fl[0][1] = cnt_b;
    col_fl[1][0] = data;
  end

  gate_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg      (cfg),
    .col_fl   (col_fl),
    .row_fl   ('0),
    .north_in ('0),
    .south_in ('0),
    .east_in  ('0),
    .west_in  ('0),
    .north_out(north_out),
    .south_out(south_out),
    .east_out (east_out),
    .west_out (west_out),
    .trees_on (trees_on)
  );

  always_comb begin
    for (int k = 0; k < ROWS; k++) begin
      z[k]   = east_out[k][B_SEQ];
      sel[k] = west_out[k][B_COMB];
    end
    sys_clk  = clk;
    lfsr_out = data;
  end

endmodule
