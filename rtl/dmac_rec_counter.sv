// Recursive (ripple) PWM counter.
//
// The input clock itself is the least significant counter bit; every further
// bit is a flip-flop that toggles on the rising edge of the bit below it,
// dividing its frequency by two. Inverting all bits gives a count that rises
// by one on every edge of the input clock, rising and falling, so a clock of
// half the frequency gives the same PWM period as the synchronous counter
// (2048 edges of a 62.5 MHz clock = 16.384 us). Count 0 starts at a rising
// edge of clk.
//
// Structure and inversion follow the recursive counter the design is based
// on. Clearing the dividers with the asynchronous reset (rather than by an
// initial value) is this design's choice. The bits other than bit 0 settle one
// flip-flop delay apart, so the count may pass through wrong values for a
// moment after an edge; users must treat the outputs as glitchy.
module dmac_rec_counter #(
  parameter int NUM_BITS = 11
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [NUM_BITS-1:0] n
);

  // div[i] toggles on the rising edge of the stage below it (the clock for i = 1).
  logic [NUM_BITS-1:1] div;

  for (genvar i = 1; i < NUM_BITS; i++) begin : g_div
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
  end

  assign n = ~{div, clk};

endmodule
