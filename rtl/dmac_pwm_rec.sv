// Recursive PWM unit.
//
// A private ripple divider chain (as in dmac_rec_counter) provides the
// inverted counter bits c[i]; c[0] is the clock. A chain of combinational
// bit modules compares the setpoint with the count from the least significant
// bit upward: bit 0 gives c[0] & s[0], every further bit gives
//     p[i] = ((c[i] & s[i]) | p[i-1]) & (c[i] | s[i]),
// the carry of c + s. The last carry is high exactly when the up-count ~c is
// below the setpoint, so pwm is high for setp of the 2**PWM_BITS edges of each
// period, starting at a rising edge of clk. Because the count advances on
// both clock edges, the clock may be half that of a counter-comparator unit.
//
// The divider, the bit-module equation and the first-bit special case follow
// the recursive PWM design; the reset of the dividers is this design's choice.
// The output is combinational from ripple-clocked flip-flops and may glitch.
module dmac_pwm_rec #(
  parameter int PWM_BITS = 11
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PWM_BITS-1:0] setp,
  output logic                pwm
);

  logic [PWM_BITS-1:1] div;  // divider flip-flops
  logic [PWM_BITS-1:0] c;    // counter bits, c[0] is the clock
  logic [PWM_BITS-1:0] p;    // comparator chain

  assign c = {div, clk};
  assign p[0] = c[0] & setp[0];

  for (genvar i = 1; i < PWM_BITS; i++) begin : g_bit
    logic src;
    if (i == 1) begin : g_first
      assign src = clk;
    end else begin : g_next
      assign src = div[i-1];
    end
    logic q;
    always_ff @(posedge src or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= ~q;
    end
    assign div[i] = q;
    assign p[i] = ((c[i] & setp[i]) | p[i-1]) & (c[i] | setp[i]);
  end

  assign pwm = p[PWM_BITS-1];

endmodule
