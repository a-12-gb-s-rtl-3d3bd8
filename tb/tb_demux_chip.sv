// End-to-end test of demux_chip at its default parameters.
//
// The chip runs from its own VCO. The test releases reset and, cycle by cycle
// on the falling system clock edge, checks against a reference model kept
// here: the LFSR bit (pattern 000111101011001, entered at its fourth bit),
// the one-hot SEL in the order 1, 2, 3, 4, and the four channel outputs
// (channel k loads the LFSR bit at the end of the cycle in which SELk is high
// and holds it otherwise). It also checks:
//   * the clock frequency at three VCO settings (four-stage end, mid-scale
//     10 GHz, two-stage end) and the resulting aggregate and channel rates,
//   * that channel Z1 shows the 15-bit pattern as a whole (every fourth bit of
//     a maximal-length sequence is the sequence itself, shifted),
//   * the trigger once per 15 clocks,
//   * the current-tree count of the DEMUX configuration (60) and that a cell
//     rewritten to all-zero configuration stops and drops its 8 trees, then
//     works again when rewritten as a select-hold cell,
//   * the original chip's operating points, 11.6 Gb/s aggregate with
//     2.9 Gb/s per channel and 12 Gb/s, by retuning the VCO and timing
//     channel Z1's updates while the cycle checks go on.
// Each of these mechanisms is counted, and one that never happened counts as
// a failure.
module tb_demux_chip;
  timeunit 1ps;
  timeprecision 1fs;
  import fpga_pkg::*;
  import demux_cfg_pkg::*;

  localparam logic [0:14] PATTERN = 15'b000111101011001;

  logic        rst_n = 1'b0, vco_en = 1'b0, cfg_we = 1'b0;
  logic [7:0]  vco_ctrl = 8'd128;
  logic [2:0]  cfg_waddr = '0;
  cell_cfg_t   cfg_wdata = CELL_OFF;
  logic        sys_clk, lfsr_out, trig;
  logic [3:0]  z, sel, mz;
  logic [15:0] trees_on;
  logic        z1_bits [15];
  int checks = 0, failures = 0, t = 0;
  int n_rate = 0, n_load = 0, n_hold = 0, n_trig = 0, n_tune = 0, n_off = 0, n_on = 0, n_z1 = 0;
  bit ch0_off = 1'b0;
  int z1_loads = 0;
  realtime z1_first = 0, z1_last = 0;

  demux_chip dut (
    .rst_n(rst_n), .vco_en(vco_en), .vco_ctrl(vco_ctrl),
    .cfg_we(cfg_we), .cfg_waddr(cfg_waddr), .cfg_wdata(cfg_wdata),
    .sys_clk(sys_clk), .z(z), .sel(sel), .lfsr_out(lfsr_out), .trig(trig),
    .trees_on(trees_on));

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d %s: got %0d expected %0d", t, what, got, exp);
    end
  endtask

  task automatic finish_test();
    $display("mechanisms: loads=%0d holds=%0d triggers=%0d vco_settings=%0d cell_off=%0d cell_on=%0d z1_words=%0d rate_points=%0d",
             n_load, n_hold, n_trig, n_tune, n_off, n_on, n_z1, n_rate);
    if (n_load == 0 || n_hold == 0 || n_trig == 0 || n_tune < 3 || n_off == 0 || n_on == 0 || n_z1 == 0 || n_rate < 2) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // One system clock cycle with all checks. Entered at a falling edge, with
  // cycle t current; returns at the next falling edge.
  task automatic run_cycle();
    expect_eq("lfsr", lfsr_out, PATTERN[(t + 3) % 15]);
    expect_eq("trig", trig, int'(t % 15 == 0));
    expect_eq("sel", sel, 4'b0001 << (t % 4));
    expect_eq("z", z, mz);
    n_trig += int'(trig);
    n_hold += int'(t >= 4);                // three channels hold in every cycle
    @(posedge sys_clk);
    if (t % 4 == 0) begin                  // channel Z1's load edge
      if (z1_loads == 0) z1_first = $realtime;
      z1_last = $realtime;
      z1_loads++;
    end
    if (!(ch0_off && t % 4 == 0)) begin
      mz[t % 4] = PATTERN[(t + 3) % 15];
      n_load++;
    end
    t++;
    @(negedge sys_clk);
  endtask

  task automatic measure(input int w);
    realtime t0, t1;
    real f, fexp;
    vco_ctrl = 8'(w);
    repeat (3) @(posedge sys_clk);
    t0 = $realtime;
    repeat (20) @(posedge sys_clk);
    t1 = $realtime;
    f = 20.0 / ((t1 - t0) * 1.0e-12);
    // independent expectation: 4-stage ring 1/(8 td) .. 2-stage ring 1/(4 td), td = 18.75 ps
    fexp = (1.0 + w / 255.0) / (8.0 * 18.75e-12);
    $display("VCO word %0d: clock %.3f GHz -> DEMUX input %.2f Gb/s, %.2f Gb/s per channel",
             w, f / 1e9, f / 1e9, f / 4e9);
    checks++;
    if (f < fexp * 0.999 || f > fexp * 1.001) begin
      failures++; $display("FAIL clock %.3f GHz, expected %.3f GHz", f / 1e9, fexp / 1e9);
    end
    n_tune++;
  endtask

  // Retune the VCO to control word w, run 60 checked cycles and measure the
  // aggregate rate (one LFSR bit per clock) and channel Z1's update rate.
  task automatic rate_point(input logic [7:0] w, input real gbps);
    real agg, ch;
    vco_ctrl = w;
    for (int i = 0; i < 4; i++) run_cycle();   // let the new period settle
    z1_loads = 0;
    for (int i = 0; i < 60; i++) run_cycle();
    ch  = (z1_loads - 1) / ((z1_last - z1_first) * 1.0e-12);
    agg = 4.0 * ch;
    $display("VCO word %0d: aggregate %.2f Gb/s, channel Z1 %.3f Gb/s (target %.1f / %.3f)",
             w, agg / 1e9, ch / 1e9, gbps, gbps / 4.0);
    checks++;
    if (agg < gbps * 1e9 * 0.99 || agg > gbps * 1e9 * 1.01) begin
      failures++; $display("FAIL rate %.3f Gb/s, expected %.1f Gb/s", agg / 1e9, gbps);
    end
    n_rate++;
  endtask

  // Watchdog on simulated time: far beyond the ~1000 cycles of the test.
  initial begin
    #1us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mz = '0;
    vco_en = 1'b1;
    measure(0);
    measure(255);
    measure(128);    // mid-scale, 10 GHz: the rest runs here
    @(negedge sys_clk);
    rst_n = 1'b1;

    // Rate: each channel loads once per four clocks.
    for (int i = 0; i < 120; i++) run_cycle();
    expect_eq("trees", trees_on, 60);

    // Channel Z1 seen once per 4 clocks over 60 clocks is the 15-bit pattern.
    for (int i = 0; i < 60; i++) begin
      if (t % 4 == 1) z1_bits[(i / 4) % 15] = z[0];
      run_cycle();
    end
    begin
      bit found = 1'b0;
      for (int s = 0; s < 15; s++) begin
        bit ok;
        ok = 1'b1;
        for (int i = 0; i < 15; i++) if (z1_bits[i] != PATTERN[(i + s) % 15]) ok = 1'b0;
        if (ok) found = 1'b1;
      end
      checks++;
      if (!found) begin failures++; $display("FAIL Z1 does not carry the LFSR pattern"); end
      else n_z1++;
    end

    // Switch off the select-hold cell of channel Z1 (cell row 0, column 1).
    cfg_we = 1'b1; cfg_waddr = 3'd1; cfg_wdata = CELL_OFF;
    run_cycle();                           // the write takes effect at this edge
    cfg_we = 1'b0;
    mz[0] = 1'b0; ch0_off = 1'b1;
    for (int i = 0; i < 40; i++) run_cycle();
    expect_eq("trees with Z1 off", trees_on, 60 - 8);
    n_off++;

    // Rewrite it as a select-hold cell: it works again.
    cfg_we = 1'b1; cfg_waddr = 3'd1; cfg_wdata = select_hold_cell();
    run_cycle();
    cfg_we = 1'b0;
    ch0_off = 1'b0;
    for (int i = 0; i < 40; i++) run_cycle();
    expect_eq("trees restored", trees_on, 60);
    n_on++;

    // Operating points of the original chip: 11.6 Gb/s (as measured) and
    // 12 Gb/s. The clock is retuned while running; the DEMUX keeps working
    // and each channel updates once every four clocks.
    rate_point(8'd189, 11.6);
    rate_point(8'd204, 12.0);

    finish_test();
  end

endmodule
