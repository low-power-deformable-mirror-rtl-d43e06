// PWM hub: one node of the tree that links the slave decoder to the PWM cells.
//
// A hub has one parent port and TREE_BRANCH (4) child ports. A command from
// the parent is stored in a one-entry register and offered to the child
// chosen by two bits of the cell index: bits [5:4] at LEVEL 0 (the root),
// [3:2] at LEVEL 1 and [1:0] at LEVEL 2. All children see the same command
// bus; only the chosen one gets c_valid. Read data travels the other way: the
// answers of the children are merged (at most one is valid at a time) and
// registered, so a read answer gains one cycle per level.
//
// Interface: parent and child command ports are valid/ready; the read-data
// path is a one-cycle valid pulse with data and has no back-pressure.
// Latency: one cycle per hub in each direction; a new command is accepted
// once the previous one has left.
// The tree shape (branching factor 4, depth 3, 64 leaves) and the hubs'
// role of routing data down and up follow the controller's slave; buffering
// and the index-bit order are this design's choices.
module dmac_hub
  import dmac_pkg::*;
#(
  parameter int LEVEL = 0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // parent
  input  logic                         p_valid,
  output logic                         p_ready,
  input  tree_cmd_t                    p_cmd,
  output logic                         up_valid,
  output logic [15:0]                  up_data,
  // children
  output logic [TREE_BRANCH-1:0]       c_valid,
  input  logic [TREE_BRANCH-1:0]       c_ready,
  output tree_cmd_t                    c_cmd,
  input  logic [TREE_BRANCH-1:0]       c_up_valid,
  input  logic [TREE_BRANCH-1:0][15:0] c_up_data
);

  localparam int LSB = IDX_W - 2 * (LEVEL + 1);

  logic       full;
  logic [1:0] sel;
  assign sel     = c_cmd.idx[LSB +: 2];
  assign p_ready = !full;

  always_comb begin
    c_valid      = '0;
    c_valid[sel] = full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= 1'b0;
      c_cmd <= '0;
    end else if (!full) begin
      if (p_valid) begin
        c_cmd <= p_cmd;
        full  <= 1'b1;
      end
    end else if (c_ready[sel]) begin
      full <= 1'b0;
    end
  end

  logic [15:0] merged;
  always_comb begin
    merged = '0;
    for (int i = 0; i < TREE_BRANCH; i++)
      if (c_up_valid[i]) merged |= c_up_data[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_valid <= 1'b0;
      up_data  <= '0;
    end else begin
      up_valid <= |c_up_valid;
      up_data  <= merged;
    end
  end

  a_one_answer: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(c_up_valid));

endmodule
