// Configuration that turns the 4-row x 2-column gate array into a 1:4 DEMUX.
//
// Left column (column 0): a 2:4 decoder. Cell in row k produces SEL(k+1)
// from the counter bits A (column-0 FastLANE seen from the north) and B
// (column-0 FastLANE seen from the south), per the truth table
//     A B | SEL1 SEL2 SEL3 SEL4
//     0 0 |  1    0    0    0
//     0 1 |  0    1    0    0
//     1 0 |  0    0    1    0
//     1 1 |  0    0    0    1
// using the FU as  SEL = A ? B' : A'' , i.e.
//     SEL1 = A ? 0 : ~B    SEL2 = A ? 0 : B
//     SEL3 = A ? ~B : 0    SEL4 = A ? B : 0
// The unused L1 multiplexer of each decoder cell and its latch stay off.
// SEL goes east to the select-hold cell and west to the edge (pads).
//
// Right column (column 1): four select-hold circuits. Cell in row k computes
// q_next = SEL ? DATA : q with c = SEL (comb from the west neighbour),
// b = DATA (column-1 FastLANE seen from the north) and a = its own latch
// output fed back, and drives the latch output east as channel Z(k+1).
package demux_cfg_pkg;
  import fpga_pkg::*;

  localparam int unsigned DEMUX_ROWS = 4;
  localparam int unsigned DEMUX_COLS = 2;

  // L1 input indices used by the DEMUX.
  localparam int unsigned IDX_FL_N   = 4 * DIR_N + 3;       // FastLANE seen from north
  localparam int unsigned IDX_FL_S   = 4 * DIR_S + 3;       // FastLANE seen from south
  localparam int unsigned IDX_W_COMB = 4 * DIR_W + B_COMB;  // west neighbour's comb
  localparam int unsigned IDX_FB     = 16;                  // own latch

  // Decoder cell producing SEL(k+1), k = 0..3.
  function automatic cell_cfg_t decoder_cell(input int unsigned k);
    cell_cfg_t c;
    c = CELL_OFF;
    c.l1c = l1_route(IDX_FL_N);                 // c = A
    unique case (k)
      0: begin c.a_mode = FU_INV;  c.b_mode = FU_ZERO; end
      1: begin c.a_mode = FU_PASS; c.b_mode = FU_ZERO; end
      2: begin c.a_mode = FU_ZERO; c.b_mode = FU_INV;  end
      default: begin c.a_mode = FU_ZERO; c.b_mode = FU_PASS; end
    endcase
    if (c.a_mode inside {FU_PASS, FU_INV}) c.l1a = l1_route(IDX_FL_S);  // a = B
    if (c.b_mode inside {FU_PASS, FU_INV}) c.l1b = l1_route(IDX_FL_S);  // b = B
    c.fu_on       = 1'b1;
    c.drv_comb[DIR_E] = 1'b1;
    c.drv_comb[DIR_W] = 1'b1;
    return c;
  endfunction

  // Select-hold cell: loads DATA while SEL is high, holds otherwise.
  function automatic cell_cfg_t select_hold_cell();
    cell_cfg_t c;
    c = CELL_OFF;
    c.l1c    = l1_route(IDX_W_COMB);   // c = SEL
    c.l1a    = l1_route(IDX_FB);       // a = q (hold)
    c.l1b    = l1_route(IDX_FL_N);     // b = DATA
    c.a_mode = FU_PASS;
    c.b_mode = FU_PASS;
    c.fu_on  = 1'b1;
    c.latch_on = 1'b1;
    c.drv_seq[DIR_E] = 1'b1;
    return c;
  endfunction

  // Whole-array configuration, word r*COLS + c for cell (r, c).
  function automatic cell_cfg_t [DEMUX_ROWS*DEMUX_COLS-1:0] demux_config();
    cell_cfg_t [DEMUX_ROWS*DEMUX_COLS-1:0] cfg;
    for (int unsigned r = 0; r < DEMUX_ROWS; r++) begin
      cfg[r*DEMUX_COLS + 0] = decoder_cell(r);
      cfg[r*DEMUX_COLS + 1] = select_hold_cell();
    end
    return cfg;
  endfunction

endpackage
