// Self-checking test of ms_latch: random data with the tree on and off, and
// an asynchronous reset in between. The expected output is a one-edge delayed
// copy of d while on, 0 while off or in reset.
module tb_ms_latch;
  logic clk = 1'b0, rst_n = 1'b0, on = 1'b0, d = 1'b0, q;
  logic expq;
  int checks = 0, failures = 0, cycles = 0;

  ms_latch dut (.clk(clk), .rst_n(rst_n), .on(on), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expq = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (cycles = 0; cycles < 400; cycles++) begin
      @(negedge clk);
      checks++;
      if (q !== expq) begin failures++; $display("FAIL cycle %0d q=%b exp=%b", cycles, q, expq); end
      if (cycles == 200) begin
        rst_n = 1'b0; #1;
        checks++;
        if (q !== 1'b0) begin failures++; $display("FAIL async reset"); end
        rst_n = 1'b1;
        expq = 1'b0;
      end
      on = ($urandom % 4) != 0;
      d  = 1'($urandom);
      expq = on ? d : 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
