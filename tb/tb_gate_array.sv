// Self-checking test of gate_array (4 rows x 2 columns).
//  1. Unconfigured: every cell off, every edge output 0, no tree on.
//  2. Redirection paths: a west-to-east relay along row 0 and a north-to-
//     south relay down column 0 (crossing four cells); each relaying cell
//     has exactly one tree on.
//  3. The DEMUX configuration with counter, data and clock driven from here:
//     SEL at the west edge and channel outputs at the east edge against a
//     reference model of the decoder and the four select-hold circuits.
module tb_gate_array;
  import fpga_pkg::*;
  import demux_cfg_pkg::*;
  localparam int unsigned ROWS = 4, COLS = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  cell_cfg_t [ROWS*COLS-1:0] cfg;
  logic [COLS-1:0][1:0] col_fl;
  logic [ROWS-1:0][1:0] row_fl;
  logic [COLS-1:0][NBUNDLE-1:0] north_in, south_in, north_out, south_out;
  logic [ROWS-1:0][NBUNDLE-1:0] east_in, west_in, east_out, west_out;
  logic [15:0] trees_on;
  logic [3:0] mz;
  int checks = 0, failures = 0;

  gate_array #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .col_fl(col_fl), .row_fl(row_fl),
    .north_in(north_in), .south_in(south_in), .east_in(east_in), .west_in(west_in),
    .north_out(north_out), .south_out(south_out), .east_out(east_out), .west_out(west_out),
    .trees_on(trees_on));

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic randomize_edges();
    north_in = 6'($urandom); south_in = 6'($urandom);
    east_in = 12'($urandom); west_in = 12'($urandom);
    row_fl = 8'($urandom); col_fl = 4'($urandom);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; randomize_edges();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. all off
    for (int t = 0; t < 10; t++) begin
      randomize_edges(); #1;
      expect_eq("off outputs", int'(|{north_out, south_out, east_out, west_out}), 0);
      expect_eq("off trees", trees_on, 0);
    end

    // 2. relays
    cfg = '0;
    cfg[0*COLS + 0].redir_sel[DIR_E][redir_index(DIR_E, DIR_W, B_COMB)]  = 1'b1;
    cfg[0*COLS + 1].redir_sel[DIR_E][redir_index(DIR_E, DIR_W, B_REDIR)] = 1'b1;
    for (int r = 0; r < ROWS; r++) begin
      cfg[r*COLS + 0].redir_sel[DIR_S][redir_index(DIR_S, DIR_N, (r == 0) ? B_SEQ : B_REDIR)] = 1'b1;
    end
    for (int t = 0; t < 50; t++) begin
      randomize_edges(); #1;
      expect_eq("row relay", east_out[0][B_REDIR], west_in[0][B_COMB]);
      expect_eq("column relay", south_out[0][B_REDIR], north_in[0][B_SEQ]);
      expect_eq("unused edge", south_out[1][B_REDIR], 0);
    end
    expect_eq("relay trees", trees_on, 2 + ROWS);

    // 3. DEMUX configuration
    cfg = demux_config();
    col_fl = '0; row_fl = '0; north_in = '0; south_in = '0; east_in = '0; west_in = '0;
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    mz = '0;
    for (int t = 0; t < 200; t++) begin
      col_fl[0][0] = t[1]; col_fl[0][1] = t[0]; col_fl[1][0] = 1'($urandom);
      #1;
      for (int k = 0; k < 4; k++) begin
        expect_eq("SEL", west_out[k][B_COMB], int'((t % 4) == k));
        expect_eq("Z", east_out[k][B_SEQ], mz[k]);
      end
      @(posedge clk);
      mz[t % 4] = col_fl[1][0];
      @(negedge clk);
    end
    // 4 decoder cells (7, 7, 7, 7 trees minus the constant inputs) + 4 x 8
    expect_eq("demux trees", trees_on, 4 * 7 + 4 * 8);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
