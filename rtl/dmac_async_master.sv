// Master of the actuator controller: the serial link to the outside.
//
// Two processes joined by handshake channels: the LVDS transceiver at 200 MHz
// (framing of 16-bit words at 40 Mbit/s and pause detection) and the packet
// handler at 100 MHz (packet decoding, commands to the slave, replies). Three
// passivators carry the received words and the pauses from the 200 MHz to the
// 100 MHz domain and the reply words back. No packet memory is used: each
// data word goes to the slave as soon as it has been received.
//
// Interface: rxd/txd are the serial lines (idle high), txen enables the
// line driver while a reply is sent; cmd and rsp are
// valid/ready channels in the clk_100 domain; rst_200_n and rst_100_n are
// resets already synchronized to their clocks.
// Latency: a data word leaves on cmd about 10 clk_100 cycles after its stop
// bit has been sampled. The two-process structure, the clocks and the removal
// of the packet RAM follow the controller's optimized master.
module dmac_async_master
  import dmac_pkg::*;
#(
  parameter logic [7:0] MODULE_ID = 8'h01
) (
  input  logic        clk_200,
  input  logic        rst_200_n,
  input  logic        clk_100,
  input  logic        rst_100_n,
  input  logic        rxd,
  output logic        txd,
  output logic        txen,
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output slave_cmd_t  cmd,
  input  logic        rsp_valid,
  output logic        rsp_ready,
  input  logic [15:0] rsp_data,
  output logic        csum_err
);

  // 200 MHz side of the channels
  logic        t_rx_valid, t_rx_ready, t_pause_valid, t_pause_ready, t_tx_valid, t_tx_ready;
  logic [15:0] t_rx_data, t_tx_data;
  // 100 MHz side
  logic        p_rx_valid, p_rx_ready, p_pause_valid, p_pause_ready, p_tx_valid, p_tx_ready;
  logic [15:0] p_rx_data, p_tx_data;
  logic        pause_bit;

  dmac_lvds_trans u_trans (
    .clk(clk_200), .rst_n(rst_200_n),
    .rxd, .txd, .tx_en(txen),
    .rx_valid(t_rx_valid), .rx_ready(t_rx_ready), .rx_data(t_rx_data),
    .pause_valid(t_pause_valid), .pause_ready(t_pause_ready),
    .tx_valid(t_tx_valid), .tx_ready(t_tx_ready), .tx_data(t_tx_data)
  );

  dmac_passivator #(.W(16)) u_pas_rx (
    .clk_0(clk_200), .rst0_n(rst_200_n), .s_valid(t_rx_valid), .s_ready(t_rx_ready), .s_data(t_rx_data),
    .clk_1(clk_100), .rst1_n(rst_100_n), .m_valid(p_rx_valid), .m_ready(p_rx_ready), .m_data(p_rx_data)
  );

  dmac_passivator #(.W(1)) u_pas_pause (
    .clk_0(clk_200), .rst0_n(rst_200_n), .s_valid(t_pause_valid), .s_ready(t_pause_ready), .s_data(1'b1),
    .clk_1(clk_100), .rst1_n(rst_100_n), .m_valid(p_pause_valid), .m_ready(p_pause_ready), .m_data(pause_bit)
  );

  dmac_passivator #(.W(16)) u_pas_tx (
    .clk_0(clk_100), .rst0_n(rst_100_n), .s_valid(p_tx_valid), .s_ready(p_tx_ready), .s_data(p_tx_data),
    .clk_1(clk_200), .rst1_n(rst_200_n), .m_valid(t_tx_valid), .m_ready(t_tx_ready), .m_data(t_tx_data)
  );

  dmac_packet #(.MODULE_ID(MODULE_ID)) u_packet (
    .clk(clk_100), .rst_n(rst_100_n),
    .rx_valid(p_rx_valid), .rx_ready(p_rx_ready), .rx_data(p_rx_data),
    .pause_valid(p_pause_valid && pause_bit), .pause_ready(p_pause_ready),
    .tx_valid(p_tx_valid), .tx_ready(p_tx_ready), .tx_data(p_tx_data),
    .cmd_valid, .cmd_ready, .cmd,
    .rsp_valid, .rsp_ready, .rsp_data,
    .csum_err
  );

endmodule
