// Testbench of dmac_packet (module id 0x01). Words and pauses are fed
// straight into its channels; a model of the slave takes commands with a
// random ready and answers reads with addr*3+0x100 after a few cycles; the
// transmit channel is taken with a random ready. Checked: single writes,
// broadcast writes, packets for other modules and unknown commands skipped,
// burst writes with rising addresses, a zero-length burst, reads and the
// reply packet {01,83}, data, checksum, a bad checksum (flagged, data still
// forwarded) and a pause that cuts a packet short.
module tb_dmac_packet;
  import dmac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic rx_valid = 1'b0, rx_ready, pause_valid = 1'b0, pause_ready;
  logic [15:0] rx_data = '0;
  logic tx_valid, tx_ready = 1'b0;
  logic [15:0] tx_data;
  logic cmd_valid, cmd_ready = 1'b0, rsp_valid = 1'b0, rsp_ready;
  slave_cmd_t cmd;
  logic [15:0] rsp_data = '0;
  logic csum_err;
  int checks = 0, failures = 0;

  dmac_packet #(.MODULE_ID(8'h01)) dut (.clk, .rst_n,
    .rx_valid, .rx_ready, .rx_data, .pause_valid, .pause_ready,
    .tx_valid, .tx_ready, .tx_data,
    .cmd_valid, .cmd_ready, .cmd, .rsp_valid, .rsp_ready, .rsp_data, .csum_err);

  always #5ns clk = ~clk;

  initial begin : watchdog
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- slave and transmit models; drive and sample on falling edges ----
  slave_cmd_t cmds[$];
  logic [15:0] txw[$];
  int csum_errs = 0;
  int rsp_delay = -1;
  bit rsp_taken = 0;
  always @(negedge clk) begin
    // a transfer seen on one falling edge happens at the next rising edge
    if (rsp_taken) begin rsp_valid = 1'b0; rsp_taken = 0; end
    if (rsp_valid && rsp_ready) rsp_taken = 1;
    cmd_ready = ($urandom_range(0, 2) != 0);
    if (cmd_valid && cmd_ready) begin
      cmds.push_back(cmd);
      if (!cmd.we) begin rsp_delay = $urandom_range(1, 6); rsp_data = 16'(cmd.addr) * 3 + 16'h100; end
    end
    if (rsp_delay == 0) rsp_valid = 1'b1;
    if (rsp_delay >= 0) rsp_delay--;
    tx_ready = ($urandom_range(0, 1) != 0);
    if (tx_valid && tx_ready) txw.push_back(tx_data);
    if (csum_err) csum_errs++;
  end

  task automatic word(logic [15:0] w);
    @(negedge clk);
    rx_valid = 1'b1; rx_data = w;
    #1ps;
    while (!rx_ready) @(negedge clk);
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  task automatic pause();
    @(negedge clk);
    pause_valid = 1'b1;
    #1ps;
    while (!pause_ready) @(negedge clk);
    @(negedge clk);
    pause_valid = 1'b0;
  endtask

  // a packet with a correct (or corrupted) checksum
  task automatic packet(logic [15:0] words[$], bit bad_sum = 0);
    logic [15:0] sum = '0;
    pause();
    foreach (words[i]) begin word(words[i]); sum += words[i]; end
    word(bad_sum ? ~sum : sum);
    repeat (20) @(negedge clk);
  endtask

  initial begin
    #22ns rst_n = 1'b1;
    repeat (3) @(negedge clk);

    packet('{16'h0101, 16'h0005, 16'hABCD});                        // write
    check(cmds.size() == 1 && cmds[0] == '{1'b1, 8'h05, 16'hABCD}, "single write");
    cmds.delete();

    packet('{16'h0201, 16'h0005, 16'h1111});                        // other module
    packet('{16'h0177, 16'h0005, 16'h1111});                        // unknown command
    check(cmds.size() == 0, "foreign or unknown packet forwarded");

    packet('{16'hFF01, 16'h0041, 16'h0001});                        // broadcast
    check(cmds.size() == 1 && cmds[0] == '{1'b1, 8'h41, 16'h0001}, "broadcast write");
    cmds.delete();

    packet('{16'h0102, 16'h0010, 16'd5, 16'h10, 16'h11, 16'h12, 16'h13, 16'h14});   // burst
    check(cmds.size() == 5, $sformatf("burst gave %0d writes", cmds.size()));
    foreach (cmds[i]) check(cmds[i] == '{1'b1, 8'h10 + 8'(i), 16'h10 + 16'(i)}, $sformatf("burst word %0d", i));
    cmds.delete();

    packet('{16'h0102, 16'h0010, 16'd0});                           // empty burst
    check(cmds.size() == 0, "empty burst wrote");

    check(csum_errs == 0, "checksum error on good packets");
    packet('{16'h0101, 16'h0007, 16'h7777}, 1);                     // bad checksum
    check(csum_errs == 1, "bad checksum not flagged");
    check(cmds.size() == 1 && cmds[0].data == 16'h7777, "data of a bad packet not forwarded");
    cmds.delete();

    txw.delete();
    packet('{16'h0103, 16'h0022});                                  // read
    repeat (50) @(negedge clk);
    check(cmds.size() == 1 && cmds[0].we == 1'b0 && cmds[0].addr == 8'h22, "read command");
    check(txw.size() == 3, $sformatf("reply of %0d words", txw.size()));
    if (txw.size() == 3) begin
      check(txw[0] == 16'h0183, "reply header");
      check(txw[1] == 16'h22 * 3 + 16'h100, "reply data");
      check(txw[2] == 16'h0183 + txw[1], "reply checksum");
    end
    cmds.delete();

    // a pause in the middle of a packet starts a new one
    pause();
    word(16'h0101); word(16'h0009);
    packet('{16'h0101, 16'h000A, 16'h5A5A});
    check(cmds.size() == 1 && cmds[0] == '{1'b1, 8'h0A, 16'h5A5A}, "packet after an aborted one");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
