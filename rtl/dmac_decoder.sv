// Decoder of the slave.
//
// Takes one command at a time from the master (write or read of an 8-bit
// slave address) and carries it out:
//   addr[7:6] = 00  setpoint of PWM cell addr[5:0]   -> sent down the tree
//   addr[7:6] = 01  control of PWM cell addr[5:0]    -> sent down the tree
//                   (bit 0: enable of that actuator)
//   0x80            global control, bit 0: global PWM enable (held here)
//   0x81            number of PWM cells (read only)
//   anything else   writes ignored, reads return 0
// Cells at or above NUM_CELLS do not exist: writes to them are dropped and
// reads return 0. For a read of a cell register the decoder waits for the
// cell's answer, which climbs back up the tree, before it returns the data on
// rsp and takes the next command, so at most one read is in the tree.
//
// Interface: cmd and rsp are valid/ready channels; dn is a valid/ready
// channel to the root hub; up_valid is a one-cycle pulse with up_data.
// That the decoder holds the global registers and steers setpoints and
// enables of all 61 cells follows the controller's design; the address map,
// register layout and one-read-at-a-time rule are this design's own.
module dmac_decoder
  import dmac_pkg::*;
#(
  parameter int NUM_CELLS = 61
) (
  input  logic        clk,
  input  logic        rst_n,
  // commands from the master
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  slave_cmd_t  cmd,
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output logic [15:0] rsp_data,
  // tree
  output logic        dn_valid,
  input  logic        dn_ready,
  output tree_cmd_t   dn,
  input  logic        up_valid,
  input  logic [15:0] up_data,
  // global registers
  output logic        global_en
);

  typedef enum logic [1:0] {S_IDLE, S_DOWN, S_WAIT_UP, S_RSP} state_e;
  state_e state;

  logic [1:0]       cls;
  logic [IDX_W-1:0] idx;
  assign cls = cmd.addr[7:6];
  assign idx = cmd.addr[IDX_W-1:0];

  assign cmd_ready = (state == S_IDLE);
  assign dn_valid  = (state == S_DOWN);
  assign rsp_valid = (state == S_RSP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      dn        <= '0;
      rsp_data  <= '0;
      global_en <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          rsp_data <= '0;
          if ((cls == AREG_SETP || cls == AREG_CTRL) && int'(idx) < NUM_CELLS) begin
            dn    <= '{we: cmd.we, sel: cls[0], idx: idx, data: cmd.data};
            state <= S_DOWN;
          end else begin
            if (cmd.we && cmd.addr == ADDR_GCTRL) global_en <= cmd.data[0];
            if (!cmd.we) begin
              if (cmd.addr == ADDR_GCTRL)  rsp_data <= {15'd0, global_en};
              if (cmd.addr == ADDR_GCELLS) rsp_data <= 16'(NUM_CELLS);
              state <= S_RSP;
            end
          end
        end
        S_DOWN: if (dn_ready) state <= dn.we ? S_IDLE : S_WAIT_UP;
        S_WAIT_UP: if (up_valid) begin
          rsp_data <= up_data;
          state    <= S_RSP;
        end
        S_RSP: if (rsp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_dn_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dn_valid && !dn_ready |=> dn_valid && $stable(dn));

endmodule
