// 4-bit linear feedback shift register: the on-chip pseudorandom source for
// the DEMUX self-test.
//
// Four master-slave stages share the system clock and shift from stage 1 to
// stage 4. Stage 1 loads the XOR of stages 1 and 4 with the stage-4 term
// inverted, i.e. the XNOR, so the all-zero power-up state is a regular
// member of the 15-state cycle (the stuck state is 1111, never reached from
// reset). The pattern is driven from stage 4 as the complementary side of
// the differential stage-4 output, which gives the 15-bit cycle
//   0 0 0 1 1 1 1 0 1 0 1 1 0 0 1 (one bit per clock, starting at reset).
// sync marks the clock in which the state is 0000 again, once per period,
// for use as an oscilloscope trigger.
// Timing: a new bit every clock; the first one is valid right after reset.
module lfsr4 (
  input  logic clk,
  input  logic rst_n,
  output logic dout,   // pseudorandom bit, 1 bit per clock
  output logic sync    // high while the state is 0000
);

  logic [4:1] st;   // st[1] = stage 1 ... st[4] = stage 4

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= 4'b0000;
    else        st <= {st[3:1], ~(st[1] ^ st[4])};
  end

  always_comb begin
    dout = ~st[4];
    sync = (st == 4'b0000);
  end

  // 1111 locks an XNOR register; reset never leads there.
  always_ff @(posedge clk) begin
    assert (st != 4'b1111) else $error("lfsr4: lock-up state reached");
  end

endmodule
