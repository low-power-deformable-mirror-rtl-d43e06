// Passivator: a handshake channel between two clock domains.
//
// A passivator joins two active handshake ports: the sender in domain clk_0
// offers a word (s_valid), the receiver in domain clk_1 asks for one
// (m_ready), and the transfer takes place when both have requested. This
// version works as follows. The sender's request toggles req_tog, which
// crosses to clk_1 through two flip-flops; there the word is offered as
// m_valid until the receiver takes it, upon which ack_tog toggles and crosses
// back to clk_0 through two flip-flops, where it completes the sender's
// transfer with a one-cycle s_ready. The data wires are not resynchronized:
// the sender holds s_data stable from s_valid until s_ready, which is long
// after the receiver has sampled it.
//
// Interface: valid/ready on both sides; a word moves when valid and ready are
// both high on a rising edge of that side's clock. Latency: about three clk_1
// cycles from s_valid to m_valid, about three clk_0 cycles from the receiver's
// transfer to s_ready; one word is in flight at a time.
//
// The role (completing a transfer when both domains request, first in the
// receiver's domain and then in the sender's) follows the passivator of the
// design it implements; the toggle-and-synchronizer construction, which
// avoids flip-flops clocked by handshake signals, is this design's own.
module dmac_passivator #(
  parameter int W = 16
) (
  // sender domain
  input  logic         clk_0,
  input  logic         rst0_n,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic [W-1:0] s_data,
  // receiver domain
  input  logic         clk_1,
  input  logic         rst1_n,
  output logic         m_valid,
  input  logic         m_ready,
  output logic [W-1:0] m_data
);

  // ---- sender domain ----
  logic       req_tog;      // toggles once per offered word
  logic       busy;         // a word is in flight
  logic [1:0] ack_sync;     // ack_tog synchronized to clk_0
  logic       ack_seen;     // last ack_tog value acted on
  logic       ack_tog;      // receiver domain: toggles once per delivered word
  logic [1:0] req_sync;     // req_tog synchronized to clk_1

  always_ff @(posedge clk_0 or negedge rst0_n) begin
    if (!rst0_n) begin
      req_tog  <= 1'b0;
      busy     <= 1'b0;
      ack_sync <= '0;
      ack_seen <= 1'b0;
      s_ready  <= 1'b0;
    end else begin
      ack_sync <= {ack_sync[0], ack_tog};
      s_ready  <= 1'b0;
      if (busy && ack_sync[1] != ack_seen) begin
        ack_seen <= ack_sync[1];
        busy     <= 1'b0;
        s_ready  <= 1'b1;          // completes the sender's transfer
      end else if (!busy && s_valid && !s_ready) begin
        busy    <= 1'b1;
        req_tog <= ~req_tog;
      end
    end
  end

  // ---- receiver domain ----

  always_ff @(posedge clk_1 or negedge rst1_n) begin
    if (!rst1_n) begin
      req_sync <= '0;
      ack_tog  <= 1'b0;
    end else begin
      req_sync <= {req_sync[0], req_tog};
      if (m_valid && m_ready) ack_tog <= ~ack_tog;
    end
  end

  assign m_valid = (req_sync[1] != ack_tog);
  assign m_data  = s_data;

  // The sender must hold its word until the passivator completes the transfer.
  a_sender_holds: assert property (@(posedge clk_0) disable iff (!rst0_n)
    busy |-> s_valid && $stable(s_data));

endmodule
