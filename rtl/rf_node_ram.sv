// rf_node_ram: model memories of the rolled forest engine.
//
// Node memory: N_TREES * (2^D - 1) words of {feature index, threshold}, one
// per internal node of every tree. Leaf memory: N_TREES * 2^D words of one
// class each (the value array holds the predicted class). A word's address
// is tree * (entries per tree) + node, with nodes in heap order.
// Writes come from the model load port: ld_leaf selects the leaf memory,
// otherwise the node memory is written. Each memory has one synchronous read
// port: data appears on the clock edge after the read request, and holds
// while no read is requested (block-RAM style). The memories are not reset.
// The arrays and their sizes follow the complete-tree layout; the load port,
// the address map and the read timing are this design's choices.
module rf_node_ram
  import rf_pkg::*;
#(
  parameter int unsigned N_TREES    = 10,
  parameter int unsigned MAX_DEPTH  = 5,
  parameter int unsigned N_FEATURES = 78,
  parameter int unsigned N_CLASSES  = 15,
  parameter int unsigned DATA_W     = 32,
  localparam int unsigned N_INT     = n_internal(MAX_DEPTH),
  localparam int unsigned N_LEAF    = n_leaves(MAX_DEPTH),
  localparam int unsigned TREE_W    = idx_w(N_TREES),
  localparam int unsigned FEAT_W    = idx_w(N_FEATURES),
  localparam int unsigned CLASS_W   = idx_w(N_CLASSES),
  localparam int unsigned NODE_D    = N_TREES * N_INT,
  localparam int unsigned LEAF_D    = N_TREES * N_LEAF,
  localparam int unsigned NADDR_W   = idx_w(NODE_D),
  localparam int unsigned LADDR_W   = idx_w(LEAF_D)
) (
  input  logic                 clk,
  // model load port
  input  logic                 ld_we,
  input  logic                 ld_leaf,
  input  logic [TREE_W-1:0]    ld_tree,
  input  logic [MAX_DEPTH-1:0] ld_node,
  input  logic [FEAT_W-1:0]    ld_feature,
  input  logic [DATA_W-1:0]    ld_threshold,
  input  logic [CLASS_W-1:0]   ld_class,
  // node read port
  input  logic                 node_rd_en,
  input  logic [TREE_W-1:0]    node_rd_tree,
  input  logic [MAX_DEPTH-1:0] node_rd_node,
  output logic [FEAT_W-1:0]    node_feature,
  output logic [DATA_W-1:0]    node_threshold,
  // leaf read port
  input  logic                 leaf_rd_en,
  input  logic [TREE_W-1:0]    leaf_rd_tree,
  input  logic [MAX_DEPTH-1:0] leaf_rd_node,
  output logic [CLASS_W-1:0]   leaf_class
);

  typedef struct packed {
    logic [FEAT_W-1:0] feature;
    logic [DATA_W-1:0] threshold;
  } node_t;

  node_t              node_mem [NODE_D];
  logic [CLASS_W-1:0] leaf_mem [LEAF_D];
  node_t              node_q;

  function automatic logic [NADDR_W-1:0] node_addr(input logic [TREE_W-1:0] t,
                                                   input logic [MAX_DEPTH-1:0] n);
    return NADDR_W'(t * N_INT + n);
  endfunction

  function automatic logic [LADDR_W-1:0] leaf_addr(input logic [TREE_W-1:0] t,
                                                   input logic [MAX_DEPTH-1:0] n);
    return LADDR_W'(t * N_LEAF + n);
  endfunction

  always_ff @(posedge clk) begin
    if (ld_we && !ld_leaf)
      node_mem[node_addr(ld_tree, ld_node)] <= '{feature: ld_feature, threshold: ld_threshold};
    if (node_rd_en)
      node_q <= node_mem[node_addr(node_rd_tree, node_rd_node)];
  end

  always_ff @(posedge clk) begin
    if (ld_we && ld_leaf)
      leaf_mem[leaf_addr(ld_tree, ld_node)] <= ld_class;
    if (leaf_rd_en)
      leaf_class <= leaf_mem[leaf_addr(leaf_rd_tree, leaf_rd_node)];
  end

  assign node_feature   = node_q.feature;
  assign node_threshold = node_q.threshold;

endmodule
