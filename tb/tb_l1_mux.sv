// Self-checking test of l1_mux in both forms: the 17:1 form (with latch
// feedback) and the 16:1 form. Every input index is routed in turn with
// random data; the expected output is the routed bit, and the expected tree
// count is two (one front and the back end, one for feedback) or zero when
// the multiplexer is switched off.
module tb_l1_mux;
  import fpga_pkg::*;
  logic [L1_INPUTS-1:0] d;
  logic                 fb;
  l1_cfg_t              cfg;
  logic                 y17, y16;
  logic [2:0]           on17, on16;
  int checks = 0, failures = 0;

  l1_mux #(.FEEDBACK(1'b1)) dut17 (.d(d), .fb(fb), .cfg(cfg), .y(y17), .trees_on(on17));
  l1_mux #(.FEEDBACK(1'b0)) dut16 (.d(d), .fb(fb), .cfg(cfg), .y(y16), .trees_on(on16));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (d=%h fb=%b)", what, got, exp, d, fb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int idx = 0; idx <= 16; idx++) begin
        d = 16'($urandom); fb = 1'($urandom);
        cfg = '0;
        if (idx == 16) cfg.back[4] = 1'b1;
        else begin
          cfg.front[idx/4][idx%4] = 1'b1;
          cfg.back[idx/4] = 1'b1;
        end
        #1;
        check("y17", y17, (idx == 16) ? fb : d[idx]);
        checks++;
        if (on17 != ((idx == 16) ? 3'd1 : 3'd2)) begin failures++; $display("FAIL on17=%0d idx=%0d", on17, idx); end
        if (idx < 16) begin
          check("y16", y16, d[idx]);
          checks++;
          if (on16 != 3'd2) begin failures++; $display("FAIL on16=%0d", on16); end
        end
      end
      cfg = '0; d = '1; fb = 1'b1; #1;
      check("off17", y17, 1'b0);
      check("off16", y16, 1'b0);
      checks++;
      if (on17 != 0 || on16 != 0) begin failures++; $display("FAIL trees on while off"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
