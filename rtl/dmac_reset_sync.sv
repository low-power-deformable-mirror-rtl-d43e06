// Reset synchronizer: asserts rst_out_n at once with rst_n and releases it
// two rising edges of clk after rst_n is released, so that every clock domain
// of the controller leaves reset in step with its own clock. Helper of this
// design; the controller it implements only mentions that it has reset logic.
module dmac_reset_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_out_n
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {rst_out_n, meta} <= 2'b00;
    else        {rst_out_n, meta} <= {meta, 1'b1};
  end

endmodule
