// Shared types of the multiplexer-based SiGe FPGA fabric.
//
// The fabric is built from basic cells of the "BCII" kind: three first-level
// (L1) input multiplexers feed a multiplexer-based function unit (FU), whose
// result goes out combinationally and through a master-slave latch, and four
// redirection multiplexers relay neighbour signals. Every multiplexer uses
// one-hot selection bits from configuration memory; a multiplexer whose
// selection bits are all zero has its current tree switched off.
//
// Conventions used by every module of the fabric:
//   * directions are numbered N=0, E=1, S=2, W=3;
//   * a neighbour bundle is 3 bits {redir, seq, comb} (bit 0 = comb);
//   * L1 multiplexer input index = 4*direction + k, k = 0 comb, 1 seq,
//     2 redir from the neighbour in that direction, k = 3 the FastLANE
//     seen from that direction; index 16 (17:1 multiplexers only) is the
//     feedback from the cell's own latch.
package fpga_pkg;

  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  localparam int unsigned NDIR       = 4;   // neighbours per cell
  localparam int unsigned NBUNDLE    = 3;   // signals each neighbour sends: comb, seq, redir
  localparam int unsigned L1_INPUTS  = 16;  // 3 per direction plus one FastLANE per direction
  localparam int unsigned REDIR_INS  = 9;   // 3 signals from each of the 3 other neighbours

  // Bit positions inside a neighbour bundle.
  localparam int unsigned B_COMB  = 0;
  localparam int unsigned B_SEQ   = 1;
  localparam int unsigned B_REDIR = 2;

  // Conditioning applied to an FU data input before the FU multiplexer.
  typedef enum logic [1:0] {
    FU_PASS = 2'd0,   // the L1 output as it is
    FU_INV  = 2'd1,   // its complement (a swap of the differential pair)
    FU_ZERO = 2'd2,   // constant 0
    FU_ONE  = 2'd3    // constant 1
  } fu_mode_e;

  // Configuration of one two-level L1 multiplexer: four 4:1 front-end
  // multiplexers (front[d] chooses among the four inputs of direction d) and
  // one back-end multiplexer (bit d picks front d, bit 4 the latch feedback).
  typedef struct packed {
    logic [NDIR-1:0][3:0] front;
    logic [4:0]           back;
  } l1_cfg_t;

  // Configuration bits of one basic cell.
  typedef struct packed {
    l1_cfg_t                         l1a;        // FU input a (17:1, with feedback)
    l1_cfg_t                         l1b;        // FU input b (17:1, with feedback)
    l1_cfg_t                         l1c;        // FU select c (16:1, back[4] unused)
    fu_mode_e                        a_mode;
    fu_mode_e                        b_mode;
    logic                            fu_on;      // FU current tree
    logic                            latch_on;   // MS latch current tree
    logic [NDIR-1:0][REDIR_INS-1:0]  redir_sel;  // one-hot, per output direction
    logic [NDIR-1:0]                 drv_comb;   // combinational output driver per direction
    logic [NDIR-1:0]                 drv_seq;    // sequential output driver per direction
  } cell_cfg_t;

  localparam l1_cfg_t   L1_OFF   = '0;
  localparam cell_cfg_t CELL_OFF = '0;

  // One-hot word with bit i set.
  function automatic logic [4:0] onehot5(input logic [2:0] i);
    logic [4:0] v;
    v = '0;
    v[i] = 1'b1;
    return v;
  endfunction

  // L1 setting that routes input index idx (0..15) or, for idx = 16, the
  // latch feedback.
  function automatic l1_cfg_t l1_route(input int unsigned idx);
    l1_cfg_t c;
    c = L1_OFF;
    if (idx >= L1_INPUTS) begin
      c.back = onehot5(3'd4);
    end else begin
      c.front[idx / 4] = 4'(onehot5(3'(idx % 4)));
      c.back           = onehot5(3'(idx / 4));
    end
    return c;
  endfunction

  // Index into the 9 redirection inputs of output direction out_dir for
  // signal k of the neighbour in direction from_dir (from_dir != out_dir).
  function automatic int unsigned redir_index(input int unsigned out_dir,
                                              input int unsigned from_dir,
                                              input int unsigned k);
    int unsigned slot;
    slot = (from_dir < out_dir) ? from_dir : from_dir - 1;
    return 3 * slot + k;
  endfunction

endpackage
