// Testbench of dmac_decoder (61 cells) with a model of the tree that holds
// 64 setpoint and control words, accepts with a random ready and answers
// reads after a random delay. Checked: setpoint and control writes reach the
// right cell and register; writes to cells 61..63 and to unused addresses
// are dropped; reads of cells return the model's data; the global enable
// register and the cell-count register read back; reads of missing cells and
// unused addresses return 0.
module tb_dmac_decoder;
  import dmac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic cmd_valid = 1'b0, cmd_ready, rsp_valid, rsp_ready = 1'b0;
  slave_cmd_t cmd = '0;
  logic [15:0] rsp_data;
  logic dn_valid, dn_ready = 1'b0, up_valid = 1'b0, global_en;
  tree_cmd_t dn;
  logic [15:0] up_data = '0;
  int checks = 0, failures = 0;

  dmac_decoder #(.NUM_CELLS(61)) dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd,
    .rsp_valid, .rsp_ready, .rsp_data, .dn_valid, .dn_ready, .dn, .up_valid, .up_data, .global_en);

  always #8ns clk = ~clk;

  initial begin : watchdog
    #400us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // tree model
  logic [15:0] m_setp [64];
  logic [15:0] m_ctrl [64];
  int up_delay = -1;
  int tree_cmds = 0;
  always @(negedge clk) begin
    up_valid = 1'b0;
    if (up_delay == 0) up_valid = 1'b1;
    if (up_delay >= 0) up_delay--;
    dn_ready = ($urandom_range(0, 2) != 0);
    if (dn_valid && dn_ready) begin
      tree_cmds++;
      if (dn.we) begin
        if (dn.sel) m_ctrl[dn.idx] = dn.data; else m_setp[dn.idx] = dn.data;
      end else begin
        up_data  = dn.sel ? m_ctrl[dn.idx] : m_setp[dn.idx];
        up_delay = $urandom_range(2, 6);
      end
    end
  end

  task automatic write(logic [7:0] a, logic [15:0] d);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = '{1'b1, a, d};
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  task automatic read(logic [7:0] a, output logic [15:0] d);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = '{1'b0, a, 16'h0};
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    rsp_ready = 1'b1;
    while (!rsp_valid) @(negedge clk);
    d = rsp_data;
    @(negedge clk);
    rsp_ready = 1'b0;
  endtask

  initial begin
    logic [15:0] d;
    logic [15:0] ref_setp [64];
    foreach (m_setp[i]) begin m_setp[i] = 16'hDEAD; m_ctrl[i] = 16'hDEAD; ref_setp[i] = 16'hDEAD; end
    #20ns rst_n = 1'b1;
    check(global_en == 1'b0, "global enable set after reset");
    for (int i = 0; i < 64; i++) begin
      d = 16'($urandom);
      write(8'(i), d);
      if (i < 61) ref_setp[i] = d;
    end
    write(8'h40 | 8'd7, 16'h0001);
    write(8'h40 | 8'd62, 16'h0001);
    write(8'hC5, 16'h1234);
    repeat (5) @(negedge clk);
    for (int i = 0; i < 64; i++) check(m_setp[i] == ref_setp[i], $sformatf("setpoint of cell %0d", i));
    check(m_ctrl[7] == 16'h0001 && m_ctrl[62] == 16'hDEAD, "control writes");
    check(tree_cmds == 62, $sformatf("%0d commands sent into the tree", tree_cmds));
    for (int k = 0; k < 8; k++) begin
      int i;
      i = $urandom_range(0, 60);
      read(8'(i), d);
      check(d == ref_setp[i], $sformatf("read of cell %0d: %h", i, d));
    end
    read(8'h47, d);  check(d == 16'h0001, "read of cell 7 control");
    read(8'd62, d);  check(d == 16'h0000, "read of a missing cell");
    read(8'hC5, d);  check(d == 16'h0000, "read of an unused address");
    read(8'h81, d);  check(d == 16'd61, "cell count register");
    write(8'h80, 16'h0001);
    check(global_en == 1'b1, "global enable not set");
    read(8'h80, d);  check(d == 16'h0001, "global control read");
    write(8'h80, 16'h0000);
    check(global_en == 1'b0, "global enable not cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
