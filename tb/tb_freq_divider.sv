// Self-checking test of freq_divider: after reset {A,B} must count 0,1,2,3
// cycle by cycle, B must have a period of 2 clocks and A of 4 clocks.
module tb_freq_divider;
  logic clk = 1'b0, rst_n = 1'b0, a, b;
  int checks = 0, failures = 0, a_rises = 0, b_rises = 0;
  logic pa = 1'b0, pb = 1'b0;

  freq_divider dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 64; t++) begin
      checks++;
      if ({a, b} !== 2'(t % 4)) begin failures++; $display("FAIL t=%0d ab=%b%b", t, a, b); end
      a_rises += int'(a & !pa); b_rises += int'(b & !pb);
      pa = a; pb = b;
      @(negedge clk);
    end
    checks++;
    if (a_rises != 16 || b_rises != 32) begin
      failures++; $display("FAIL rates: A %0d B %0d rising edges in 64 clocks", a_rises, b_rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
