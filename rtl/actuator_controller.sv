// Deformable-mirror actuator controller, top level.
//
// Receives register writes and reads as packets on a 40 Mbit/s serial line
// and drives 61 electromagnetic actuators, each through an H-bridge with five
// PWM signals (A0, A1, C0, C1, B) of period 16.384 us and 16-bit setpoint
// resolution. The master (dmac_async_master: serial transceiver at 200 MHz,
// packet handler at 100 MHz) passes each command through a passivator into
// the slave's clock domain; the slave (dmac_async_slave: decoder, PWM
// counter, tree of 21 hubs and 61 PWM cells) updates the registers and makes
// the signals. Read answers return through a second passivator.
//
// Clocks: clk_200, clk_100 and clk_slave are independent; clk_slave must be
// 125 MHz for PWM_KIND = PWM_SYNC and 62.5 MHz for the recursive kinds (the
// default, PWM_REC_COUNTER). rst_n is asynchronous and active low; each
// domain leaves reset two of its own clocks after rst_n rises.
// Latency: a setpoint takes effect well under 1 us after the stop bit of its
// data word.
// The partition into master, passivators and a single slave, the clock rates
// and the default PWM kind follow the controller's low-power design; the
// packet format and register map are this design's own (see dmac_pkg).
module actuator_controller
  import dmac_pkg::*;
#(
  parameter int         NUM_CELLS = 61,
  parameter pwm_kind_e  PWM_KIND  = PWM_REC_COUNTER,
  parameter logic [7:0] MODULE_ID = 8'h01
) (
  input  logic                 clk_200,
  input  logic                 clk_100,
  input  logic                 clk_slave,
  input  logic                 rst_n,
  input  logic                 lvds_rxd,
  output logic                 lvds_txd,
  output logic                 lvds_txen,
  output logic                 csum_err,
  output logic [NUM_CELLS-1:0] pwm_a0,
  output logic [NUM_CELLS-1:0] pwm_a1,
  output logic [NUM_CELLS-1:0] pwm_c0,
  output logic [NUM_CELLS-1:0] pwm_c1,
  output logic [NUM_CELLS-1:0] pwm_b
);

  logic rst_200_n, rst_100_n, rst_s_n;

  dmac_reset_sync u_rs_200 (.clk(clk_200),   .rst_n, .rst_out_n(rst_200_n));
  dmac_reset_sync u_rs_100 (.clk(clk_100),   .rst_n, .rst_out_n(rst_100_n));
  dmac_reset_sync u_rs_s   (.clk(clk_slave), .rst_n, .rst_out_n(rst_s_n));

  // master side (clk_100)
  logic        m_cmd_valid, m_cmd_ready, m_rsp_valid, m_rsp_ready;
  slave_cmd_t  m_cmd;
  logic [15:0] m_rsp_data;
  // slave side (clk_slave)
  logic        s_cmd_valid, s_cmd_ready, s_rsp_valid, s_rsp_ready;
  slave_cmd_t  s_cmd;
  logic [15:0] s_rsp_data;

  dmac_async_master #(.MODULE_ID(MODULE_ID)) u_master (
    .clk_200, .rst_200_n, .clk_100, .rst_100_n,
    .rxd(lvds_rxd), .txd(lvds_txd), .txen(lvds_txen),
    .cmd_valid(m_cmd_valid), .cmd_ready(m_cmd_ready), .cmd(m_cmd),
    .rsp_valid(m_rsp_valid), .rsp_ready(m_rsp_ready), .rsp_data(m_rsp_data),
    .csum_err
  );

  dmac_passivator #(.W($bits(slave_cmd_t))) u_pas_cmd (
    .clk_0(clk_100),   .rst0_n(rst_100_n), .s_valid(m_cmd_valid), .s_ready(m_cmd_ready), .s_data(m_cmd),
    .clk_1(clk_slave), .rst1_n(rst_s_n),   .m_valid(s_cmd_valid), .m_ready(s_cmd_ready), .m_data(s_cmd)
  );

  dmac_passivator #(.W(16)) u_pas_rsp (
    .clk_0(clk_slave), .rst0_n(rst_s_n),   .s_valid(s_rsp_valid), .s_ready(s_rsp_ready), .s_data(s_rsp_data),
    .clk_1(clk_100),   .rst1_n(rst_100_n), .m_valid(m_rsp_valid), .m_ready(m_rsp_ready), .m_data(m_rsp_data)
  );

  dmac_async_slave #(.NUM_CELLS(NUM_CELLS), .PWM_KIND(PWM_KIND)) u_slave (
    .clk(clk_slave), .rst_n(rst_s_n),
    .cmd_valid(s_cmd_valid), .cmd_ready(s_cmd_ready), .cmd(s_cmd),
    .rsp_valid(s_rsp_valid), .rsp_ready(s_rsp_ready), .rsp_data(s_rsp_data),
    .a0(pwm_a0), .a1(pwm_a1), .c0(pwm_c0), .c1(pwm_c1), .b(pwm_b)
  );

endmodule
