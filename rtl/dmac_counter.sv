// Central PWM counter of the slave, synchronous version.
//
// An NUM_BITS-wide register is incremented on every rising edge of the slave
// clock and wraps from its maximum back to zero, so one PWM period lasts
// 2**NUM_BITS clocks (2048 x 8 ns = 16.384 us at the original 125 MHz). All
// PWM cells compare their duty values with this count. The 11-bit width and
// the wrap follow the controller's original counter; the asynchronous
// active-low reset to zero is this design's choice.
module dmac_counter #(
  parameter int NUM_BITS = 11
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [NUM_BITS-1:0] n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n <= '0;
    else        n <= n + 1'b1;
  end

endmodule
