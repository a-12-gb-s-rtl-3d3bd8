// Self-checking test of lfsr4: after reset the output must repeat the 15-bit
// pattern 000111101011001, entered at its fourth bit (the reset state 0000
// makes the first bits 1111010110...), for ten periods, and sync must pulse
// exactly once per period, in the first cycle after reset and every 15th.
module tb_lfsr4;
  localparam logic [0:14] PATTERN = 15'b000111101011001;
  logic clk = 1'b0, rst_n = 1'b0, dout, sync;
  int checks = 0, failures = 0, syncs = 0;

  lfsr4 dut (.clk(clk), .rst_n(rst_n), .dout(dout), .sync(sync));

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
    for (int t = 0; t < 150; t++) begin
      checks++;
      if (dout !== PATTERN[(t + 3) % 15]) begin
        failures++; $display("FAIL bit %0d: %b expected %b", t, dout, PATTERN[(t + 3) % 15]);
      end
      checks++;
      if (sync !== (t % 15 == 0)) begin failures++; $display("FAIL sync at %0d", t); end
      syncs += int'(sync);
      @(negedge clk);
    end
    checks++;
    if (syncs != 10) begin failures++; $display("FAIL %0d sync pulses", syncs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
