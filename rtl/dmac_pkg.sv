// Shared types and constants of the deformable-mirror actuator controller.
//
// The controller receives 16-bit words over a 40 Mbit/s serial line, groups
// them into packets and turns write packets into register writes in the slave,
// whose 61 PWM cells drive one H-bridge each. This package holds the widths,
// the packet command codes, the slave address map and the payload structs of
// the handshake channels. Packet format, command codes and address map are
// this design's own choice; the widths (16-bit words, 11-bit PWM counter,
// 16-bit setpoint, 61 actuators, tree of branching factor 4 and depth 3)
// follow the controller it implements.
package dmac_pkg;

  localparam int WORD_W     = 16;  // data word on the serial line
  localparam int PWM_BITS   = 11;  // PWM counter width, period 2048 counts
  localparam int TREE_BRANCH = 4;  // hub fan-out
  localparam int NUM_LEAVES = 64;  // TREE_BRANCH ** 3 hub levels
  localparam int NUM_HUBS   = 21;  // 1 + 4 + 16
  localparam int IDX_W      = 6;   // cell index width, log2(NUM_LEAVES)

  // Command field of a packet header {module_id[15:8], command[7:0]}.
  typedef enum logic [7:0] {
    CMD_WRITE       = 8'h01,  // address, data, checksum
    CMD_BURST_WRITE = 8'h02,  // start address, count, data..., checksum
    CMD_READ        = 8'h03,  // address, checksum; answered by CMD_READ_REPLY
    CMD_READ_REPLY  = 8'h83   // data, checksum
  } pkt_cmd_e;

  localparam logic [7:0] BROADCAST_ID = 8'hFF;

  // Slave address map: addr[7:6] selects the register class.
  localparam logic [1:0] AREG_SETP   = 2'b00;  // setpoint of cell addr[5:0]
  localparam logic [1:0] AREG_CTRL   = 2'b01;  // control of cell addr[5:0], bit0 enable
  localparam logic [1:0] AREG_GLOBAL = 2'b10;  // global registers
  localparam logic [7:0] ADDR_GCTRL  = 8'h80;  // bit0: global PWM enable
  localparam logic [7:0] ADDR_GCELLS = 8'h81;  // read only: number of cells

  // Reset setpoint: mid-scale, zero volts over the actuator.
  localparam logic [15:0] SETP_RESET = 16'h8000;

  // How the PWM cells make their signals.
  typedef enum logic [1:0] {
    PWM_SYNC        = 2'd0,  // shared binary counter on every rising edge, registered compare
    PWM_REC_COUNTER = 2'd1,  // shared ripple counter active on both edges, half clock
    PWM_REC_UNIT    = 2'd2   // a recursive PWM unit with its own divider per signal
  } pwm_kind_e;

  // Master to slave command.
  typedef struct packed {
    logic              we;
    logic [7:0]        addr;
    logic [WORD_W-1:0] data;
  } slave_cmd_t;

  // Decoder to cells, routed through the hub tree.
  typedef struct packed {
    logic              we;
    logic              sel;   // 0: setpoint, 1: control
    logic [IDX_W-1:0]  idx;
    logic [WORD_W-1:0] data;
  } tree_cmd_t;

endpackage
