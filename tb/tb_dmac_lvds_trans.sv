// Testbench of dmac_lvds_trans at 200 MHz with a 40 Mbit/s line.
// Receive: packets of random words (and 0xFFFF words, the longest run of
// high bits) are sent back to back; every word must be received unchanged
// and in order, and a pause must be reported once per gap between packets
// (and once after reset), never inside a packet. A 5 ns low glitch and a
// frame with a low stop bit must produce no word.
// Transmit: words offered back to back must appear on txd as start bit, data
// LSB first and stop bit, 25 ns per bit, 450 ns from one start bit to the
// next, with tx_en high during every bit and low before and after.
module tb_dmac_lvds_trans;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic rxd = 1'b1, txd, tx_en;
  logic rx_valid, rx_ready = 1'b1, pause_valid, pause_ready = 1'b1;
  logic tx_valid = 1'b0, tx_ready;
  logic [15:0] rx_data, tx_data = '0;
  int checks = 0, failures = 0;

  dmac_lvds_trans dut (.clk, .rst_n, .rxd, .txd, .tx_en,
    .rx_valid, .rx_ready, .rx_data, .pause_valid, .pause_ready,
    .tx_valid, .tx_ready, .tx_data);

  always #2.5ns clk = ~clk;

  initial begin : watchdog
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- line driver ----
  task automatic send_frame(logic [15:0] w, logic stop = 1'b1);
    rxd = 1'b0; #25ns;
    for (int i = 0; i < 16; i++) begin rxd = w[i]; #25ns; end
    rxd = stop; #25ns;
    rxd = 1'b1;
  endtask

  // ---- collectors (sampled on falling clock edges) ----
  logic [15:0] got[$];
  int pauses = 0;
  always @(negedge clk) begin
    if (rx_valid && rx_ready) got.push_back(rx_data);
    if (pause_valid && pause_ready) pauses++;
  end

  // ---- transmit decoder ----
  logic [15:0] tx_got[$];
  realtime     tx_start[$];
  int          en_low = 0;   // bit samples taken while tx_en was low
  initial begin
    wait (rst_n);
    forever begin
      logic [15:0] w;
      @(negedge txd);
      tx_start.push_back($realtime);
      #12.5ns;
      if (txd !== 1'b0) begin failures++; $display("FAIL: start bit"); end
      if (!tx_en) en_low++;
      for (int i = 0; i < 16; i++) begin #25ns; w[i] = txd; if (!tx_en) en_low++; end
      #25ns;
      if (!tx_en) en_low++;
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL: stop bit"); end
      tx_got.push_back(w);
    end
  end

  initial begin
    logic [15:0] sent[$];
    int pauses_before;
    #22ns rst_n = 1'b1;
    #600ns;
    check(pauses == 1, $sformatf("%0d pauses after reset, expected 1", pauses));

    // three packets of 6 words, 600 ns gap between packets
    for (int p = 0; p < 3; p++) begin
      pauses_before = pauses;
      for (int i = 0; i < 6; i++) begin
        logic [15:0] w;
        w = (i % 2 == 1) ? 16'hFFFF : 16'($urandom);
        sent.push_back(w);
        send_frame(w);
      end
      check(pauses == pauses_before, "pause inside a packet");
      #600ns;
      check(pauses == pauses_before + 1, "no pause after a packet");
    end
    #100ns;
    check(got.size() == sent.size(), $sformatf("received %0d words, sent %0d", got.size(), sent.size()));
    foreach (sent[i]) if (i < got.size())
      check(got[i] === sent[i], $sformatf("word %0d: got %h sent %h", i, got[i], sent[i]));

    // glitch and bad stop bit
    got.delete();
    rxd = 1'b0; #5ns; rxd = 1'b1; #600ns;
    send_frame(16'h1234, 1'b0);
    #600ns;
    check(got.size() == 0, "a glitch or a bad frame produced a word");
    send_frame(16'h00A5);
    #100ns;
    check(got.size() == 1 && got[0] == 16'h00A5, "word after a bad frame lost");

    // transmit four words back to back
    check(!tx_en, "line driver enabled before anything was sent");
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      tx_valid = 1'b1; tx_data = (i == 0) ? 16'h8001 : 16'($urandom);
      sent.push_back(tx_data);
      while (!tx_ready) @(negedge clk);
      @(negedge clk);
      tx_valid = 1'b0;
    end
    #1us;
    check(en_low == 0, $sformatf("tx_en low during %0d transmitted bits", en_low));
    check(!tx_en, "line driver still enabled after the last word");
    check(tx_got.size() == 4, $sformatf("%0d words transmitted", tx_got.size()));
    foreach (tx_got[i])
      check(tx_got[i] === sent[sent.size()-4+i], $sformatf("tx word %0d: %h", i, tx_got[i]));
    for (int i = 1; i < tx_start.size(); i++)
      check(tx_start[i] - tx_start[i-1] >= 450ns && tx_start[i] - tx_start[i-1] <= 460ns,
            $sformatf("frame spacing %0t", tx_start[i] - tx_start[i-1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
