// Self-checking test of onehot_mux (9:1, the redirection size): every
// single-bit selection and the all-zero (off) selection, with random data.
// Expected values come from indexing the data word directly.
module tb_onehot_mux;
  localparam int unsigned N = 9;
  logic [N-1:0] d, sel;
  logic         y, tree_on;
  int checks = 0, failures = 0;

  onehot_mux #(.N(N)) dut (.d(d), .sel(sel), .y(y), .tree_on(tree_on));

  task automatic check(input bit exp_y, input bit exp_on);
    checks++;
    if (y !== exp_y || tree_on !== exp_on) begin
      failures++;
      $display("FAIL d=%b sel=%b y=%b/%b on=%b/%b", d, sel, y, exp_y, tree_on, exp_on);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      d = N'($urandom);
      for (int i = 0; i < N; i++) begin
        sel = '0; sel[i] = 1'b1; #1;
        check(d[i], 1'b1);
      end
      sel = '0; #1;
      check(1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
