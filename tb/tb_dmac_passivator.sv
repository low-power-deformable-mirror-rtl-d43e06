// Testbench of dmac_passivator: a sender at 100 MHz offers 200 random words
// with random gaps; a receiver at 125 MHz takes them with a randomly
// switching ready. Every word must arrive once, in order and unchanged; the
// sender must see exactly one s_ready per word; and each word must reach the
// receiver within 8 receiver clocks of being offered while it is ready.
// The same is then repeated with the clocks swapped in speed (sender faster).
module tb_dmac_passivator;
  logic clk_0 = 1'b0, clk_1 = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic s_valid = 1'b0, s_ready, m_valid, m_ready = 1'b0;
  logic [15:0] s_data = '0, m_data;
  int checks = 0, failures = 0;
  realtime half0 = 5ns, half1 = 4ns;

  dmac_passivator #(.W(16)) dut (
    .clk_0, .rst0_n(rst_n), .s_valid, .s_ready, .s_data,
    .clk_1, .rst1_n(rst_n), .m_valid, .m_ready, .m_data);

  always #(half0) clk_0 = ~clk_0;
  always #(half1) clk_1 = ~clk_1;

  initial begin : watchdog
    #400us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] sent[$], got[$];
  int acks;
  bit  sending_done;

  // receiver: random ready, collects words
  // (the testbench drives and samples on falling edges, away from the DUT's
  // rising edges; a transfer takes place at the rising edge that follows)
  always @(negedge clk_1) begin
    m_ready = ($urandom_range(0, 3) != 0);
    if (m_valid && m_ready) got.push_back(m_data);
  end

  // count acknowledges to the sender
  always @(negedge clk_0) if (s_valid && s_ready) acks++;

  task automatic run_round(int nwords);
    sent.delete(); got.delete(); acks = 0;
    for (int i = 0; i < nwords; i++) begin
      repeat ($urandom_range(0, 4)) @(negedge clk_0);
      s_valid = 1'b1;
      s_data  = 16'($urandom);
      sent.push_back(s_data);
      do @(negedge clk_0); while (!s_ready);
      @(negedge clk_0);            // the transfer took place at the rising edge between
      s_valid = 1'b0;
      s_data  = 16'($urandom);     // data may change once the word is done
    end
    repeat (20) @(posedge clk_1);
    checks++;
    if (got.size() != sent.size()) begin
      failures++; $display("FAIL: sent %0d got %0d", sent.size(), got.size());
    end
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== sent[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: word %0d got %h sent %h", i, got[i], sent[i]);
      end
    end
    checks++;
    if (acks != nwords) begin failures++; $display("FAIL: %0d acknowledges for %0d words", acks, nwords); end
  endtask

  initial begin
    int lat;
    #30ns rst_n = 1'b1;
    repeat (3) @(negedge clk_0);
    run_round(200);
    // latency with an always-ready receiver
    force m_ready = 1'b1;
    @(negedge clk_0);
    s_valid = 1'b1; s_data = 16'hBEEF;
    lat = 0;
    @(negedge clk_1);
    while (!m_valid) begin @(negedge clk_1); lat++; end
    checks++;
    if (lat > 8 || m_data !== 16'hBEEF) begin failures++; $display("FAIL: latency %0d data %h", lat, m_data); end
    do @(negedge clk_0); while (!s_ready);
    @(negedge clk_0);
    s_valid = 1'b0;
    release m_ready;
    repeat (10) @(posedge clk_0);
    // sender faster than receiver
    half0 = 2.5ns; half1 = 6ns;
    repeat (10) @(negedge clk_0);
    run_round(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
