// Testbench of dmac_hub at LEVEL 1 (routing on index bits [3:2]). Random
// commands are pushed in while the children accept with a random ready;
// each command must come out unchanged on exactly the child its index bits
// select, in order. Read answers from each child, one at a time, must reach
// the parent one cycle later with the child's data.
module tb_dmac_hub;
  import dmac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic p_valid = 1'b0, p_ready, up_valid;
  tree_cmd_t p_cmd = '0, c_cmd;
  logic [15:0] up_data;
  logic [3:0] c_valid, c_ready = '0, c_up_valid = '0;
  logic [3:0][15:0] c_up_data = '0;
  int checks = 0, failures = 0;

  dmac_hub #(.LEVEL(1)) dut (.clk, .rst_n, .p_valid, .p_ready, .p_cmd, .up_valid, .up_data,
    .c_valid, .c_ready, .c_cmd, .c_up_valid, .c_up_data);

  always #4ns clk = ~clk;

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  tree_cmd_t sent[$], got[$];
  int wrong_child = 0;
  always @(negedge clk) begin
    c_ready = 4'($urandom);
    for (int j = 0; j < 4; j++)
      if (c_valid[j] && c_ready[j]) begin
        got.push_back(c_cmd);
        if (c_cmd.idx[3:2] != 2'(j)) wrong_child++;
      end
    if (!$onehot0(c_valid)) wrong_child++;
  end

  initial begin
    #20ns rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 100; i++) begin
      p_valid = 1'b1;
      p_cmd   = tree_cmd_t'({$urandom, $urandom});
      sent.push_back(p_cmd);
      while (!p_ready) @(negedge clk);
      @(negedge clk);
      p_valid = 1'b0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (30) @(negedge clk);
    check(got.size() == sent.size(), $sformatf("%0d of %0d commands delivered", got.size(), sent.size()));
    foreach (sent[i]) if (i < got.size()) check(got[i] == sent[i], $sformatf("command %0d changed", i));
    check(wrong_child == 0, $sformatf("%0d commands at a wrong child", wrong_child));
    // read answers
    for (int j = 0; j < 4; j++) begin
      logic [15:0] d;
      d = 16'($urandom);
      @(negedge clk);
      c_up_valid = 4'b1 << j; c_up_data = '0; c_up_data[j] = d;
      @(negedge clk);
      c_up_valid = '0; c_up_data = '1;   // garbage on idle data lines
      check(up_valid && up_data == d, $sformatf("answer of child %0d", j));
      @(negedge clk);
      check(!up_valid, "answer repeated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
