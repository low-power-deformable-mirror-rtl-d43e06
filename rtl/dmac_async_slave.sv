// Slave of the actuator controller: all 61 actuators in one module.
//
// The decoder takes register commands from the master and sends cell
// commands into the PWM tree of hubs and cells; the counter that the cells
// compare with depends on PWM_KIND:
//   PWM_SYNC         dmac_counter, 11-bit binary counter, clk at 125 MHz
//   PWM_REC_COUNTER  dmac_rec_counter, ripple counter on both edges of a
//                    62.5 MHz clk (default)
//   PWM_REC_UNIT     no shared counter; every cell holds recursive PWM units,
//                    62.5 MHz clk
// Each setting gives the 16.384 us PWM period of the controller.
//
// Interface: cmd and rsp are valid/ready channels in the clk domain; the five
// signal vectors have one bit per actuator. Latency: a write accepted on cmd
// is in its cell register 5 clk cycles later.
// Merging two 31-channel slaves into one, the decoder/counter/tree split and
// the three PWM variants follow the controller; choosing the recursive
// counter as the default follows its finding that this variant saves the most
// power.
module dmac_async_slave
  import dmac_pkg::*;
#(
  parameter int        NUM_CELLS = 61,
  parameter pwm_kind_e PWM_KIND  = PWM_REC_COUNTER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  slave_cmd_t           cmd,
  output logic                 rsp_valid,
  input  logic                 rsp_ready,
  output logic [15:0]          rsp_data,
  output logic [NUM_CELLS-1:0] a0,
  output logic [NUM_CELLS-1:0] a1,
  output logic [NUM_CELLS-1:0] c0,
  output logic [NUM_CELLS-1:0] c1,
  output logic [NUM_CELLS-1:0] b
);

  logic                dn_valid, dn_ready, up_valid, global_en;
  tree_cmd_t           dn;
  logic [15:0]         up_data;
  logic [PWM_BITS-1:0] count;

  dmac_decoder #(.NUM_CELLS(NUM_CELLS)) u_decoder (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd,
    .rsp_valid, .rsp_ready, .rsp_data,
    .dn_valid, .dn_ready, .dn,
    .up_valid, .up_data,
    .global_en
  );

  if (PWM_KIND == PWM_SYNC) begin : g_sync_counter
    dmac_counter #(.NUM_BITS(PWM_BITS)) u_counter (.clk, .rst_n, .n(count));
  end else if (PWM_KIND == PWM_REC_COUNTER) begin : g_rec_counter
    dmac_rec_counter #(.NUM_BITS(PWM_BITS)) u_counter (.clk, .rst_n, .n(count));
  end else begin : g_no_counter
    assign count = '0;
  end

  dmac_pwm_tree #(.NUM_CELLS(NUM_CELLS), .PWM_KIND(PWM_KIND)) u_tree (
    .clk, .rst_n,
    .dn_valid, .dn_ready, .dn,
    .up_valid, .up_data,
    .count, .global_en,
    .a0, .a1, .c0, .c1, .b
  );

endmodule
