// Self-checking test of bcii_cell.
//  1. Random configurations: random L1 routes for a, b (incl. feedback) and
//     c, random FU modes, latch and drivers; a reference model in this file
//     computes comb, seq and the tree count each cycle.
//  2. The DEMUX configurations: the four decoder cells against the 2:4 truth
//     table and the select-hold cell (load on SEL, hold otherwise).
//  3. Redirection only: a west-to-east relay with everything else off, one
//     tree on.
module tb_bcii_cell;
  import fpga_pkg::*;
  import demux_cfg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  cell_cfg_t cfg;
  logic [NDIR-1:0][NBUNDLE-1:0] nbr_in, nbr_out;
  logic [NDIR-1:0] fl_in;
  logic [5:0] trees_on;
  logic mq;  // model latch
  int checks = 0, failures = 0;

  bcii_cell dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .nbr_in(nbr_in), .fl_in(fl_in),
                 .nbr_out(nbr_out), .trees_on(trees_on));

  always #5 clk = ~clk;

  function automatic logic pick(input int idx);
    if (idx == 16) return mq;
    if (idx % 4 == 3) return fl_in[idx / 4];
    return nbr_in[idx / 4][idx % 4];
  endfunction

  function automatic logic cond(input logic x, input fu_mode_e m);
    case (m)
      FU_PASS: return x;
      FU_INV:  return !x;
      FU_ZERO: return 1'b0;
      default: return 1'b1;
    endcase
  endfunction

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib, ic, exp_on;
    logic ey;
    cfg = CELL_OFF; nbr_in = '0; fl_in = '0; mq = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. random configurations
    for (int rep = 0; rep < 300; rep++) begin
      ia = $urandom % 17; ib = $urandom % 17; ic = $urandom % 16;
      cfg = CELL_OFF;
      cfg.l1a = l1_route(ia); cfg.l1b = l1_route(ib); cfg.l1c = l1_route(ic);
      cfg.a_mode = fu_mode_e'($urandom); cfg.b_mode = fu_mode_e'($urandom);
      cfg.fu_on = 1'b1; cfg.latch_on = 1'b1;
      cfg.drv_comb = 4'($urandom); cfg.drv_seq = 4'($urandom);
      for (int k = 0; k < 8; k++) begin
        nbr_in = 12'($urandom); fl_in = 4'($urandom);
        #1;
        ey = pick(ic) ? cond(pick(ib), cfg.b_mode) : cond(pick(ia), cfg.a_mode);
        for (int dd = 0; dd < NDIR; dd++) begin
          expect_eq("comb", nbr_out[dd][B_COMB], ey & cfg.drv_comb[dd]);
          expect_eq("seq",  nbr_out[dd][B_SEQ],  mq & cfg.drv_seq[dd]);
          expect_eq("redir off", nbr_out[dd][B_REDIR], 0);
        end
        exp_on = ((ia == 16) ? 1 : 2) + ((ib == 16) ? 1 : 2) + 2 + 2
                 + $countones(cfg.drv_comb) + $countones(cfg.drv_seq);
        expect_eq("trees", trees_on, exp_on);
        @(posedge clk); mq = ey; @(negedge clk);
      end
    end

    // 2a. decoder cells against the truth table (A from north, B from south)
    for (int k = 0; k < 4; k++) begin
      cfg = decoder_cell(k);
      for (int ab = 0; ab < 4; ab++) begin
        fl_in = '0; fl_in[DIR_N] = ab[1]; fl_in[DIR_S] = ab[0]; nbr_in = 12'($urandom);
        #1;
        expect_eq("SEL east", nbr_out[DIR_E][B_COMB], int'(ab == k));
        expect_eq("SEL west", nbr_out[DIR_W][B_COMB], int'(ab == k));
        expect_eq("SEL north off", nbr_out[DIR_N][B_COMB], 0);
      end
      // constant-mode inputs leave their L1 multiplexer off
      expect_eq("decoder trees", trees_on, 2 + 2 + 1 + 2);
    end

    // 2b. select-hold cell: q <= SEL ? DATA : q
    cfg = select_hold_cell();
    @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      nbr_in = 12'($urandom); fl_in = 4'($urandom);
      #1;
      expect_eq("hold out", nbr_out[DIR_E][B_SEQ], mq);
      @(posedge clk);
      if (nbr_in[DIR_W][B_COMB]) mq = fl_in[DIR_N];
      @(negedge clk);
    end
    expect_eq("select-hold trees", trees_on, 2 + 1 + 2 + 1 + 1 + 1);

    // 3. redirection only: west comb relayed east
    cfg = CELL_OFF;
    cfg.redir_sel[DIR_E][redir_index(DIR_E, DIR_W, B_COMB)] = 1'b1;
    for (int t = 0; t < 20; t++) begin
      nbr_in = 12'($urandom); #1;
      expect_eq("relay", nbr_out[DIR_E][B_REDIR], nbr_in[DIR_W][B_COMB]);
      expect_eq("relay comb off", nbr_out[DIR_E][B_COMB], 0);
    end
    expect_eq("relay trees", trees_on, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
