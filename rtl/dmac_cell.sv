// PWM cell: one actuator's registers and its five H-bridge signals.
//
// Registers: a 16-bit setpoint (reset 0x8000, zero volts) and a control word
// whose bit 0 enables the actuator (reset off). A write command sets one of
// them; a read command answers one cycle later on up_valid/up_data.
//
// Signal generation. The setpoint's upper 12 bits v drive the two H-bridge
// legs as three-level PWM over a period of 2048 counts:
//     A0 high while count < dutyA,  dutyA = min(ceil(v/2), 2047)
//     C0 high while count < dutyC,  dutyC = 2047 - floor(v/2)
// so the mean differential voltage, A0 minus C0, is (v - 2047)/2048 of the
// supply. A1 and C1 are the inverses of A0 and C0, so neither leg ever closes
// both of its switches. The lowest 4 setpoint bits drive B, high while
// count[10:7] < setpoint[3:0], a 4-bit PWM of the same period. With the cell
// or the global enable off, all four switches are open and B is low.
// PWM_KIND selects how the comparison is made:
//   PWM_SYNC         count from dmac_counter, comparisons registered on clk
//   PWM_REC_COUNTER  count from dmac_rec_counter (both edges), unregistered
//   PWM_REC_UNIT     three dmac_pwm_rec units with their own dividers;
//                    count is not used
// A new setpoint acts at once, inside the running period.
//
// Interface: cmd is valid/ready (always ready); its index bits are not used
// here, as the tree has already routed the command. Timing: 2048 counts per
// period: 2048 clocks for PWM_SYNC, 1024 clocks for the recursive kinds.
// The five signals, inverted A1/C1, the 12+4 bit split, the registered
// comparator and the two recursive variants follow the controller; the exact
// duty formulas, register layout and disable behaviour are this design's.
module dmac_cell
  import dmac_pkg::*;
#(
  parameter pwm_kind_e PWM_KIND = PWM_REC_COUNTER
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  tree_cmd_t           cmd,
  output logic                up_valid,
  output logic [15:0]         up_data,
  input  logic [PWM_BITS-1:0] count,
  input  logic                global_en,
  output logic                a0,
  output logic                a1,
  output logic                c0,
  output logic                c1,
  output logic                b
);

  logic [15:0] setp;
  logic        en;

  assign cmd_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      setp     <= SETP_RESET;
      en       <= 1'b0;
      up_valid <= 1'b0;
      up_data  <= '0;
    end else begin
      up_valid <= 1'b0;
      if (cmd_valid) begin
        if (cmd.we) begin
          if (cmd.sel) en   <= cmd.data[0];
          else         setp <= cmd.data;
        end else begin
          up_valid <= 1'b1;
          up_data  <= cmd.sel ? {15'd0, en} : setp;
        end
      end
    end
  end

  // Duty values, in counts of 2**PWM_BITS per period.
  logic [11:0]         v;
  logic [PWM_BITS-1:0] duty_a, duty_c, duty_b;
  assign v      = setp[15:4];
  assign duty_a = (v == 12'hFFF) ? PWM_BITS'(2047) : PWM_BITS'((13'(v) + 13'd1) >> 1);
  assign duty_c = PWM_BITS'(2047) - PWM_BITS'(v >> 1);
  assign duty_b = {setp[3:0], 7'd0};

  logic a_raw, c_raw, b_raw;

  if (PWM_KIND == PWM_SYNC) begin : g_sync
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) {a_raw, c_raw, b_raw} <= '0;
      else        {a_raw, c_raw, b_raw} <= {count < duty_a, count < duty_c, count < duty_b};
    end
  end else if (PWM_KIND == PWM_REC_COUNTER) begin : g_rec_counter
    assign a_raw = count < duty_a;
    assign c_raw = count < duty_c;
    assign b_raw = count < duty_b;
  end else begin : g_rec_unit
    dmac_pwm_rec #(.PWM_BITS(PWM_BITS)) u_a (.clk, .rst_n, .setp(duty_a), .pwm(a_raw));
    dmac_pwm_rec #(.PWM_BITS(PWM_BITS)) u_c (.clk, .rst_n, .setp(duty_c), .pwm(c_raw));
    dmac_pwm_rec #(.PWM_BITS(PWM_BITS)) u_b (.clk, .rst_n, .setp(duty_b), .pwm(b_raw));
  end

  logic on;
  assign on = en & global_en;
  assign a0 = on &  a_raw;
  assign a1 = on & ~a_raw;
  assign c0 = on &  c_raw;
  assign c1 = on & ~c_raw;
  assign b  = on &  b_raw;

  // Never both switches of one leg closed.
  a_leg_a: assert property (@(posedge clk) !(a0 && a1));
  a_leg_c: assert property (@(posedge clk) !(c0 && c1));

endmodule
