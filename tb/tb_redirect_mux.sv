// Self-checking test of redirect_mux for all four output directions. For
// each of the nine selections the expected output is found by listing the
// other three directions in increasing order and taking signal k of the
// slot-th one; the own direction's signals must never appear.
module tb_redirect_mux;
  import fpga_pkg::*;
  logic [NDIR-1:0][NBUNDLE-1:0] nbr;
  logic [NDIR-1:0][REDIR_INS-1:0] sel;
  logic [NDIR-1:0] y, on;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NDIR; g++) begin : g_dut
    redirect_mux #(.DIR(g)) dut (.nbr(nbr), .sel(sel[g]), .y(y[g]), .tree_on(on[g]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int others[3];
    for (int rep = 0; rep < 40; rep++) begin
      nbr = 12'($urandom);
      for (int od = 0; od < NDIR; od++) begin
        int n;
        n = 0;
        for (int dd = 0; dd < NDIR; dd++) if (dd != od) others[n++] = dd;
        for (int s = 0; s < REDIR_INS; s++) begin
          sel = '0; sel[od][s] = 1'b1; #1;
          checks++;
          if (y[od] !== nbr[others[s/3]][s%3] || on[od] !== 1'b1) begin
            failures++;
            $display("FAIL dir %0d slot %0d y=%b exp=%b", od, s, y[od], nbr[others[s/3]][s%3]);
          end
        end
        sel = '0; nbr = '1; #1;
        checks++;
        if (y[od] !== 1'b0 || on[od] !== 1'b0) begin failures++; $display("FAIL dir %0d off", od); end
        nbr = 12'($urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
