// Packet handler of the master.
//
// Works on whole packets of 16-bit words, separated on the line by pauses.
// After a pause the first word is the header {module id[15:8], command[7:0]}.
// A packet for another module (neither MODULE_ID nor the broadcast id 0xFF)
// or with an unknown command is skipped up to the next pause. Otherwise:
//   WRITE        address, data, checksum
//   BURST_WRITE  start address, count, count data words, checksum
//   READ         address, checksum
// Every data word goes to the slave as soon as it arrives, with no packet
// buffer; the address rises by one per word of a burst. The checksum word is
// compared with the 16-bit sum of all earlier words of the packet, and a
// mismatch only pulses csum_err: the data has already gone to the slave. A
// READ is sent to the slave after its checksum; the slave's answer is returned
// as a packet {MODULE_ID, 0x83}, data, checksum (sum of the two).
//
// Interface: valid/ready channels. While a command waits for the slave,
// rx_ready and pause_ready are low. A pause aborts whatever packet is being
// received.
//
// Header contents (module id and command), passing data on unbuffered and
// adding header and checksum to replies follow the controller's packet
// process; the word layout, command codes, checksum rule and broadcast id are
// this design's own, as the link protocol itself is defined elsewhere.
module dmac_packet
  import dmac_pkg::*;
#(
  parameter logic [7:0] MODULE_ID = 8'h01
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the transceiver
  input  logic        rx_valid,
  output logic        rx_ready,
  input  logic [15:0] rx_data,
  input  logic        pause_valid,
  output logic        pause_ready,
  // to the transceiver
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic [15:0] tx_data,
  // to and from the slave
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output slave_cmd_t  cmd,
  input  logic        rsp_valid,
  output logic        rsp_ready,
  input  logic [15:0] rsp_data,
  // status
  output logic        csum_err
);

  typedef enum logic [3:0] {
    S_SKIP, S_HEADER, S_ADDR, S_COUNT, S_DATA, S_CSUM,
    S_WRITE, S_READ, S_WAIT_RSP, S_REPLY
  } state_e;

  state_e      state;
  pkt_cmd_e    kind;
  logic [7:0]  addr;
  logic [15:0] count;
  logic [15:0] sum;
  logic [15:0] rd_data;
  logic [1:0]  reply_idx;

  logic take;
  assign take        = rx_valid && rx_ready;
  assign rx_ready    = state inside {S_SKIP, S_HEADER, S_ADDR, S_COUNT, S_DATA, S_CSUM};
  assign pause_ready = rx_ready;   // a pause waits while a command or reply is busy
  assign cmd_valid   = state inside {S_WRITE, S_READ};
  assign rsp_ready   = (state == S_WAIT_RSP);
  assign tx_valid    = (state == S_REPLY);

  always_comb begin
    case (reply_idx)
      2'd0:    tx_data = {MODULE_ID, CMD_READ_REPLY};
      2'd1:    tx_data = rd_data;
      default: tx_data = {MODULE_ID, CMD_READ_REPLY} + rd_data;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_SKIP;
      kind      <= CMD_WRITE;
      addr      <= '0;
      count     <= '0;
      sum       <= '0;
      rd_data   <= '0;
      reply_idx <= '0;
      cmd       <= '0;
      csum_err  <= 1'b0;
    end else begin
      csum_err <= 1'b0;
      if (pause_valid && pause_ready) begin
        state <= S_HEADER;
      end else begin
        unique case (state)
          S_SKIP: ;  // discard words until the next pause
          S_HEADER: if (take) begin
            sum <= rx_data;
            if ((rx_data[15:8] == MODULE_ID || rx_data[15:8] == BROADCAST_ID) &&
                rx_data[7:0] inside {CMD_WRITE, CMD_BURST_WRITE, CMD_READ}) begin
              kind  <= pkt_cmd_e'(rx_data[7:0]);
              state <= S_ADDR;
            end else begin
              state <= S_SKIP;
            end
          end
          S_ADDR: if (take) begin
            sum  <= sum + rx_data;
            addr <= rx_data[7:0];
            unique case (kind)
              CMD_BURST_WRITE: state <= S_COUNT;
              CMD_READ:        state <= S_CSUM;
              default:         state <= S_DATA;
            endcase
            count <= 16'd1;
          end
          S_COUNT: if (take) begin
            sum   <= sum + rx_data;
            count <= rx_data;
            state <= (rx_data == 16'd0) ? S_CSUM : S_DATA;
          end
          S_DATA: if (take) begin
            sum   <= sum + rx_data;
            cmd   <= '{we: 1'b1, addr: addr, data: rx_data};
            state <= S_WRITE;
          end
          S_WRITE: if (cmd_ready) begin
            addr  <= addr + 8'd1;
            count <= count - 16'd1;
            state <= (count == 16'd1) ? S_CSUM : S_DATA;
          end
          S_CSUM: if (take) begin
            csum_err <= (rx_data != sum);
            if (kind == CMD_READ) begin
              cmd   <= '{we: 1'b0, addr: addr, data: 16'h0000};
              state <= S_READ;
            end else begin
              state <= S_SKIP;
            end
          end
          S_READ: if (cmd_ready) state <= S_WAIT_RSP;
          S_WAIT_RSP: if (rsp_valid) begin
            rd_data   <= rsp_data;
            reply_idx <= '0;
            state     <= S_REPLY;
          end
          S_REPLY: if (tx_ready) begin
            reply_idx <= reply_idx + 2'd1;
            if (reply_idx == 2'd2) state <= S_SKIP;
          end
          default: state <= S_SKIP;
        endcase
      end
    end
  end

  // A command stays on offer, unchanged, until the slave takes it.
  a_cmd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));

endmodule
