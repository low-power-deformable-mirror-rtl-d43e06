// PWM tree: the hubs and cells of the slave.
//
// The decoder reaches the cells through a tree of dmac_hub nodes with
// branching factor 4 and depth 3: one root hub, 4 hubs below it and 16 below
// those, 21 in all, whose 64 child ports are the leaves. Nodes are numbered
// as in a heap: node 0 is the root and the children of node k are 4k+1 ..
// 4k+4, so leaf node 21+i holds PWM cell i. Leaves at or above NUM_CELLS
// (61..63 for the full controller) are empty: they accept and drop commands.
// Every cell receives the shared counter and the global enable directly.
//
// Interface: dn is the valid/ready command port of the root hub; up is the
// read answer (one-cycle pulse) leaving the root. Latency: a write accepted
// by the root is in its cell register 4 clocks later (one per hub level and
// one in the cell); a read is answered on up 7 clocks after acceptance.
// Tree shape and the split into hubs and cells follow the controller's
// slave; the numbering is this design's.
module dmac_pwm_tree
  import dmac_pkg::*;
#(
  parameter int        NUM_CELLS = 61,
  parameter pwm_kind_e PWM_KIND  = PWM_REC_COUNTER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 dn_valid,
  output logic                 dn_ready,
  input  tree_cmd_t            dn,
  output logic                 up_valid,
  output logic [15:0]          up_data,
  input  logic [PWM_BITS-1:0]  count,
  input  logic                 global_en,
  output logic [NUM_CELLS-1:0] a0,
  output logic [NUM_CELLS-1:0] a1,
  output logic [NUM_CELLS-1:0] c0,
  output logic [NUM_CELLS-1:0] c1,
  output logic [NUM_CELLS-1:0] b
);

  localparam int NUM_NODES = NUM_HUBS + NUM_LEAVES;

  // Per node: command valid/ready into the node and its read answer.
  logic        nv   [NUM_NODES];
  logic        nr   [NUM_NODES];
  logic        nupv [NUM_NODES];
  logic [15:0] nupd [NUM_NODES];
  // Per hub: the command bus shared by its children.
  tree_cmd_t   hcmd [NUM_HUBS];

  assign nv[0]    = dn_valid;
  assign dn_ready = nr[0];
  assign up_valid = nupv[0];
  assign up_data  = nupd[0];

  for (genvar k = 0; k < NUM_HUBS; k++) begin : g_hub
    localparam int LEVEL = (k == 0) ? 0 : (k < 5) ? 1 : 2;
    logic [TREE_BRANCH-1:0]       cv, cr, cupv;
    logic [TREE_BRANCH-1:0][15:0] cupd;
    for (genvar j = 0; j < TREE_BRANCH; j++) begin : g_child
      assign nv[4*k+1+j] = cv[j];
      assign cr[j]       = nr[4*k+1+j];
      assign cupv[j]     = nupv[4*k+1+j];
      assign cupd[j]     = nupd[4*k+1+j];
    end
    dmac_hub #(.LEVEL(LEVEL)) u_hub (
      .clk, .rst_n,
      .p_valid(nv[k]), .p_ready(nr[k]), .p_cmd((k == 0) ? dn : hcmd[(k-1)/4]),
      .up_valid(nupv[k]), .up_data(nupd[k]),
      .c_valid(cv), .c_ready(cr), .c_cmd(hcmd[k]),
      .c_up_valid(cupv), .c_up_data(cupd)
    );
  end

  for (genvar i = 0; i < NUM_LEAVES; i++) begin : g_leaf
    localparam int NODE = NUM_HUBS + i;
    if (i < NUM_CELLS) begin : g_cell
      dmac_cell #(.PWM_KIND(PWM_KIND)) u_cell (
        .clk, .rst_n,
        .cmd_valid(nv[NODE]), .cmd_ready(nr[NODE]), .cmd(hcmd[(NODE-1)/4]),
        .up_valid(nupv[NODE]), .up_data(nupd[NODE]),
        .count, .global_en,
        .a0(a0[i]), .a1(a1[i]), .c0(c0[i]), .c1(c1[i]), .b(b[i])
      );
    end else begin : g_empty
      assign nr[NODE]   = 1'b1;
      assign nupv[NODE] = 1'b0;
      assign nupd[NODE] = '0;
    end
  end

endmodule
