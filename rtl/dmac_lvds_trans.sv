// LVDS transceiver of the master: serial framing and pause detection.
//
// Line format: idle high; each 16-bit word is an 18-bit frame of a start bit
// (0), 16 data bits least significant first and a stop bit (1), 25 ns per bit
// (40 Mbit/s). Running at 200 MHz, one bit lasts CLKS_PER_BIT = 5 clocks.
//
// Receive: the line passes two synchronizing flip-flops. A falling edge while
// idle starts a frame; the start bit is checked in its middle, then every bit
// is sampled CLKS_PER_BIT clocks later, into a shift register. A frame with a
// good stop bit is offered on rx_valid/rx_data; the receiver keeps no second
// word, so a word not taken before the next one is complete is dropped.
// Pause: a separate counter measures how long the line has been high without
// interruption; after PAUSE_BITS bit times it raises pause_valid once, marking
// the gap between two packets (a data word can give at most 17 high bits in a
// row: 16 ones and the stop bit).
// Transmit: a word accepted on tx_valid/tx_ready is sent as start bit, data
// LSB first and stop bit, each bit CLKS_PER_BIT clocks long. tx_en, the
// enable of the line driver, is high from the start bit of a word to the end
// of the stop bit of the last word sent back to back, so that controllers
// sharing a line leave it free when they are not replying.
//
// Frame format, rate, 200 MHz sampling, start-edge detection and the
// 18-high-bit pause rule follow the controller's link; mid-bit sampling, the
// two-flop synchronizer and dropping of bad or unclaimed frames are this
// design's choices. All channels are valid/ready.
module dmac_lvds_trans #(
  parameter int CLKS_PER_BIT = 5,
  parameter int PAUSE_BITS   = 18
) (
  input  logic        clk,
  input  logic        rst_n,
  // serial lines
  input  logic        rxd,
  output logic        txd,
  output logic        tx_en,
  // received words
  output logic        rx_valid,
  input  logic        rx_ready,
  output logic [15:0] rx_data,
  // pause between packets
  output logic        pause_valid,
  input  logic        pause_ready,
  // words to send
  input  logic        tx_valid,
  output logic        tx_ready,
  input  logic [15:0] tx_data
);

  localparam int CW = $clog2(CLKS_PER_BIT * PAUSE_BITS + 1);
  localparam int HALF = CLKS_PER_BIT / 2;

  // ---------------- receive ----------------
  logic [1:0]    rx_sync;
  logic          rx_line, rx_prev;
  logic          rx_busy;
  logic [4:0]    rx_bit;       // 0: start bit, 1..16: data, 17: stop bit
  logic [CW-1:0] rx_cnt;
  logic [15:0]   rx_shift;

  assign rx_line = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync  <= 2'b11;
      rx_prev  <= 1'b1;
      rx_busy  <= 1'b0;
      rx_bit   <= '0;
      rx_cnt   <= '0;
      rx_shift <= '0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      rx_sync <= {rx_sync[0], rxd};
      rx_prev <= rx_line;
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      if (!rx_busy) begin
        if (rx_prev && !rx_line) begin          // falling edge: start bit
          rx_busy <= 1'b1;
          rx_bit  <= '0;
          rx_cnt  <= CW'(HALF - 1);             // to the middle of the start bit
        end
      end else if (rx_cnt != 0) begin
        rx_cnt <= rx_cnt - 1'b1;
      end else begin
        rx_cnt <= CW'(CLKS_PER_BIT - 1);
        rx_bit <= rx_bit + 1'b1;
        if (rx_bit == 5'd0) begin
          if (rx_line) rx_busy <= 1'b0;          // a glitch, not a start bit
        end else if (rx_bit <= 5'd16) begin
          rx_shift <= {rx_line, rx_shift[15:1]}; // LSB arrives first
        end else begin
          rx_busy <= 1'b0;
          if (rx_line && !(rx_valid && !rx_ready)) begin
            rx_valid <= 1'b1;
            rx_data  <= rx_shift;
          end
        end
      end
    end
  end

  // ---------------- pause detection ----------------
  localparam int PAUSE_CLKS = CLKS_PER_BIT * PAUSE_BITS;
  logic [CW-1:0] high_cnt;
  logic          pause_sent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      high_cnt    <= '0;
      pause_sent  <= 1'b0;   // an idle line after reset also marks a packet start
      pause_valid <= 1'b0;
    end else begin
      if (pause_valid && pause_ready) pause_valid <= 1'b0;
      if (!rx_line) begin
        high_cnt   <= '0;
        pause_sent <= 1'b0;
      end else if (high_cnt != CW'(PAUSE_CLKS)) begin
        high_cnt <= high_cnt + 1'b1;
      end else if (!pause_sent) begin
        pause_sent  <= 1'b1;
        pause_valid <= 1'b1;
      end
    end
  end

  // ---------------- transmit ----------------
  logic [16:0]   tx_shift;     // stop, data[15:0]; bit 0 goes out next
  logic [4:0]    tx_left;      // bits still to send after the current one
  logic [CW-1:0] tx_cnt;       // clocks left in the current bit

  assign tx_ready = (tx_left == 0) && (tx_cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift <= '1;
      tx_left  <= '0;
      tx_cnt   <= '0;
      txd      <= 1'b1;
      tx_en    <= 1'b0;
    end else if (tx_cnt != 0) begin
      tx_cnt <= tx_cnt - 1'b1;
    end else if (tx_left != 0) begin
      txd      <= tx_shift[0];
      tx_shift <= {1'b1, tx_shift[16:1]};
      tx_left  <= tx_left - 1'b1;
      tx_cnt   <= CW'(CLKS_PER_BIT - 1);
    end else if (tx_valid) begin
      txd      <= 1'b0;                     // start bit
      tx_en    <= 1'b1;
      tx_shift <= {1'b1, tx_data};
      tx_left  <= 5'd17;
      tx_cnt   <= CW'(CLKS_PER_BIT - 1);
    end else begin
      txd   <= 1'b1;
      tx_en <= 1'b0;                        // line released after the stop bit
    end
  end

  a_rx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rx_valid && !rx_ready |=> rx_valid && $stable(rx_data));

endmodule
