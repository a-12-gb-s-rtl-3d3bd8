// Self-checking test of config_memory: reset loads INIT (here a recognisable
// pattern), then random single-word writes are compared against a shadow
// copy, word by word, one cycle after each write; a reset restores INIT.
module tb_config_memory;
  import fpga_pkg::*;
  localparam int unsigned ROWS = 4, COLS = 2, W = ROWS * COLS;
  localparam cell_cfg_t [W-1:0] INIT = {W{cell_cfg_t'({($bits(cell_cfg_t)/2){2'b10}})}};

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [2:0] waddr = '0;
  cell_cfg_t wdata, tmp;
  cell_cfg_t [W-1:0] cfg, shadow;
  int checks = 0, failures = 0;

  config_memory #(.ROWS(ROWS), .COLS(COLS), .INIT(INIT)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .cfg(cfg));

  always #5 clk = ~clk;

  function automatic cell_cfg_t rand_cfg();
    logic [$bits(cell_cfg_t)-1:0] v;
    for (int i = 0; i < $bits(cell_cfg_t); i += 32) v[i +: 32] = $urandom;
    return cell_cfg_t'(v);
  endfunction

  task automatic compare(input string what);
    for (int i = 0; i < W; i++) begin
      checks++;
      if (cfg[i] !== shadow[i]) begin failures++; $display("FAIL %s word %0d", what, i); end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = '0;
    @(negedge clk);
    shadow = INIT;
    compare("reset");
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      we = ($urandom % 3) != 0; waddr = 3'($urandom); tmp = rand_cfg(); wdata = tmp;
      @(negedge clk);
      if (we) shadow[waddr] = tmp;
      compare("write");
    end
    we = 1'b0;
    rst_n = 1'b0; #1; shadow = INIT; compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
