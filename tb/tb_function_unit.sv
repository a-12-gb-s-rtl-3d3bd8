// Self-checking test of function_unit: all input values, all mode pairs and
// both enable values, against y = c ? B : A written out case by case.
module tb_function_unit;
  import fpga_pkg::*;
  logic a, b, c, fu_on, y;
  fu_mode_e am, bm;
  int checks = 0, failures = 0;

  function automatic logic ref_cond(input logic x, input int m);
    if (m == 0) return x;
    if (m == 1) return !x;
    if (m == 2) return 1'b0;
    return 1'b1;
  endfunction

  function_unit dut (.a(a), .b(b), .c(c), .a_mode(am), .b_mode(bm), .fu_on(fu_on), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8 * 16 * 2; v++) begin
      {fu_on, am, bm, c, b, a} = 10'(v);
      #1;
      checks++;
      if (y !== (fu_on ? (c ? ref_cond(b, int'(bm)) : ref_cond(a, int'(am))) : 1'b0)) begin
        failures++;
        $display("FAIL on=%b am=%0d bm=%0d a=%b b=%b c=%b y=%b", fu_on, am, bm, a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
