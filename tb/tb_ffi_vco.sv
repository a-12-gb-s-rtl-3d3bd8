// Self-checking test of the ffi_vco model: measures the period at several
// control words and compares it with the four-stage / two-stage
// interpolation f = f4 + (f2 - f4) * w / 255, f4 = 1/(8 TD), f2 = 1/(4 TD),
// TD = 18.75 ps (10 GHz at mid-scale), to within 0.1 %. Also checks that
// the clock stops while en is low.
module tb_ffi_vco;
  timeunit 1fs;
  timeprecision 1fs;
  logic en = 1'b0, clk;
  logic [7:0] vctrl = '0;
  int checks = 0, failures = 0, edges;

  ffi_vco dut (.en(en), .vctrl(vctrl), .clk(clk));

  initial begin
    #100ns;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    real exp_f, got_f, td;
    int ws[5] = '{0, 64, 128, 200, 255};
    td = 18.75e-12;
    #1000;
    en = 1'b1;
    foreach (ws[i]) begin
      vctrl = 8'(ws[i]);
      repeat (3) @(posedge clk);
      t0 = $realtime;
      repeat (10) @(posedge clk);
      t1 = $realtime;
      got_f = 10.0 / ((t1 - t0) * 1.0e-15);
      exp_f = 1.0 / (8.0 * td) + (1.0 / (4.0 * td) - 1.0 / (8.0 * td)) * ws[i] / 255.0;
      checks++;
      if (got_f < exp_f * 0.999 || got_f > exp_f * 1.001) begin
        failures++;
        $display("FAIL vctrl=%0d: %f GHz, expected %f GHz", ws[i], got_f / 1e9, exp_f / 1e9);
      end else
        $display("vctrl=%0d: %f GHz", ws[i], got_f / 1e9);
    end
    en = 1'b0;
    #1000;
    edges = 0;
    fork
      begin : count
        forever begin @(posedge clk); edges++; end
      end
      #2000000;
    join_any
    disable fork;
    checks++;
    if (edges != 0 || clk !== 1'b0) begin failures++; $display("FAIL clock runs while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
