// rf_forest_rolled: random-forest classifier, rolled form.
//
// One tree walker (rf_tree_walker) is shared by all trees and visits them
// one after another, one tree level per clock, reading the model from the
// node and leaf memories (rf_node_ram). When every tree has given its class,
// the majority vote (rf_vote) selects the forest's class.
// Model load: ld_we with ld_leaf = 0 writes internal node ld_node (heap
// order) of tree ld_tree with {ld_feature, ld_threshold}; with ld_leaf = 1 it
// writes leaf ld_node with ld_class. Do not load while a sample is in flight.
// Samples: in_valid/in_ready handshake; one sample at a time. out_valid
// is high for one clock N_TREES*(MAX_DEPTH+1)+2 clock cycles after the cycle
// in which the sample was accepted, with the class on out_class. This trades latency for area, since only one
// comparator and one feature multiplexer are built.
// Sequential visiting of trees is the rolled scheme; the memories' layout,
// the load port and the timing are this design's choices.
module rf_forest_rolled
  import rf_pkg::*;
#(
  parameter int unsigned N_TREES    = 10,
  parameter int unsigned MAX_DEPTH  = 5,
  parameter int unsigned N_FEATURES = 78,
  parameter int unsigned N_CLASSES  = 15,
  parameter int unsigned DATA_W     = 32,
  parameter bit          FLOAT      = 1'b1,
  localparam int unsigned TREE_W    = idx_w(N_TREES),
  localparam int unsigned FEAT_W    = idx_w(N_FEATURES),
  localparam int unsigned CLASS_W   = idx_w(N_CLASSES)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // model load port
  input  logic                              ld_we,
  input  logic                              ld_leaf,
  input  logic [TREE_W-1:0]                 ld_tree,
  input  logic [MAX_DEPTH-1:0]              ld_node,
  input  logic [FEAT_W-1:0]                 ld_feature,
  input  logic [DATA_W-1:0]                 ld_threshold,
  input  logic [CLASS_W-1:0]                ld_class,
  // samples
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [N_FEATURES-1:0][DATA_W-1:0] in_x,
  output logic                              out_valid,
  output logic [CLASS_W-1:0]                out_class
);

  logic                            node_rd_en, leaf_rd_en;
  logic [TREE_W-1:0]               node_rd_tree, leaf_rd_tree;
  logic [MAX_DEPTH-1:0]            node_rd_node, leaf_rd_node;
  logic [FEAT_W-1:0]               node_feature;
  logic [DATA_W-1:0]               node_threshold;
  logic [CLASS_W-1:0]              leaf_class;
  logic                            votes_valid;
  logic [N_TREES-1:0][CLASS_W-1:0] votes;

  rf_node_ram #(
    .N_TREES(N_TREES), .MAX_DEPTH(MAX_DEPTH), .N_FEATURES(N_FEATURES),
    .N_CLASSES(N_CLASSES), .DATA_W(DATA_W)
  ) u_ram (
    .clk, .ld_we, .ld_leaf, .ld_tree, .ld_node, .ld_feature, .ld_threshold, .ld_class,
    .node_rd_en, .node_rd_tree, .node_rd_node, .node_feature, .node_threshold,
    .leaf_rd_en, .leaf_rd_tree, .leaf_rd_node, .leaf_class
  );

  rf_tree_walker #(
    .N_TREES(N_TREES), .MAX_DEPTH(MAX_DEPTH), .N_FEATURES(N_FEATURES),
    .N_CLASSES(N_CLASSES), .DATA_W(DATA_W), .FLOAT(FLOAT)
  ) u_walker (
    .clk, .rst_n, .in_valid, .in_ready, .in_x,
    .node_rd_en, .node_rd_tree, .node_rd_node, .node_feature, .node_threshold,
    .leaf_rd_en, .leaf_rd_tree, .leaf_rd_node, .leaf_class,
    .votes_valid, .votes
  );

  rf_vote #(.N_TREES(N_TREES), .N_CLASSES(N_CLASSES)) u_vote (
    .clk, .rst_n,
    .in_valid  (votes_valid),
    .in_classes(votes),
    .out_valid,
    .out_class
  );

endmodule
