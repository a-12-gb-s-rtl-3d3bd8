// Power-down workload on a 4 x 4 gate array: 10 cells used, 6 switched off.
//
// Columns 0-1 hold the DEMUX (2:4 decoder and four select-hold cells, 8
// cells). Cells (0,2) and (0,3) relay channel Z1 eastwards with only their
// redirection multiplexer on, so Z1 leaves the array at its east edge two
// columns further on. The remaining six cells are given all-zero
// configuration. The test checks the DEMUX function through the relays
// against a reference model, and that the six unused cells add no current
// tree: the array's count must equal the 8 DEMUX cells' 60 trees plus one
// per relay cell. It also shows the saving: with the six cells configured
// as cells that are on but idle (FU and latch on) the count rises.
module tb_array_4x4;
  import fpga_pkg::*;
  import demux_cfg_pkg::*;
  localparam int unsigned ROWS = 4, COLS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  cell_cfg_t [ROWS*COLS-1:0] cfg;
  logic [COLS-1:0][1:0] col_fl;
  logic [COLS-1:0][NBUNDLE-1:0] north_out, south_out;
  logic [ROWS-1:0][NBUNDLE-1:0] east_out, west_out;
  logic [15:0] trees_on;
  logic [3:0] mz;
  int checks = 0, failures = 0, relayed = 0, off_cells = 0;

  gate_array #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .col_fl(col_fl), .row_fl('0),
    .north_in('0), .south_in('0), .east_in('0), .west_in('0),
    .north_out(north_out), .south_out(south_out), .east_out(east_out), .west_out(west_out),
    .trees_on(trees_on));

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_cfg_t relay1, relay2, idle;
    cfg = '0;
    for (int r = 0; r < 4; r++) begin
      cfg[r*COLS + 0] = decoder_cell(r);
      cfg[r*COLS + 1] = select_hold_cell();
    end
    relay1 = CELL_OFF;
    relay1.redir_sel[DIR_E][redir_index(DIR_E, DIR_W, B_SEQ)] = 1'b1;
    relay2 = CELL_OFF;
    relay2.redir_sel[DIR_E][redir_index(DIR_E, DIR_W, B_REDIR)] = 1'b1;
    cfg[0*COLS + 2] = relay1;
    cfg[0*COLS + 3] = relay2;
    for (int i = 0; i < ROWS * COLS; i++) off_cells += int'(cfg[i] == CELL_OFF);
    expect_eq("unused cells", off_cells, 6);

    col_fl = '0; mz = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 120; t++) begin
      col_fl[0][0] = t[1]; col_fl[0][1] = t[0]; col_fl[1][0] = 1'($urandom);
      #1;
      for (int k = 0; k < 4; k++) expect_eq("SEL", west_out[k][B_COMB], int'((t % 4) == k));
      expect_eq("Z1 through relays", east_out[0][B_REDIR], mz[0]);
      relayed += int'(mz[0]);
      @(posedge clk);
      mz[t % 4] = col_fl[1][0];
      @(negedge clk);
    end
    expect_eq("trees, 6 cells off", trees_on, 60 + 2);
    checks++;
    if (relayed == 0) begin failures++; $display("FAIL no 1 was ever relayed"); end

    // Same array with the six unused cells on but idle.
    idle = CELL_OFF; idle.fu_on = 1'b1; idle.latch_on = 1'b1;
    for (int i = 0; i < ROWS * COLS; i++) if (cfg[i] == CELL_OFF) cfg[i] = idle;
    #1;
    expect_eq("trees, 6 idle cells on", trees_on, 60 + 2 + 6 * 2);
    $display("current trees: %0d with unused cells off, %0d with them on and idle",
             62, trees_on);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
