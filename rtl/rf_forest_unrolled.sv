// rf_forest_unrolled: random-forest classifier, unrolled form.
//
// Every tree has its own rf_tree_unrolled, which evaluates all of its node
// comparisons at once into a comparison array and resolves the leaf; all
// trees run side by side and the majority vote (rf_vote) combines their
// classes. The model is held in registers, because every node is read in
// every clock.
// Model load: ld_we with ld_leaf = 0 writes internal node ld_node (heap
// order) of tree ld_tree with {ld_feature, ld_threshold}; with ld_leaf = 1 it
// writes leaf ld_node with ld_class. Do not load while a sample is in flight.
// Samples: in_ready is always high; a sample may enter every clock, and its
// class appears on out_class with out_valid three clock cycles after the
// cycle in which it is presented (comparison array, leaf class, vote).
// Parallel evaluation of all comparisons is the unrolled scheme; running all
// trees in parallel, the register storage, the load port and the pipeline
// are this design's choices.
module rf_forest_unrolled
  import rf_pkg::*;
#(
  parameter int unsigned N_TREES    = 10,
  parameter int unsigned MAX_DEPTH  = 5,
  parameter int unsigned N_FEATURES = 78,
  parameter int unsigned N_CLASSES  = 15,
  parameter int unsigned DATA_W     = 32,
  parameter bit          FLOAT      = 1'b1,
  localparam int unsigned N_INT     = n_internal(MAX_DEPTH),
  localparam int unsigned N_LEAF    = n_leaves(MAX_DEPTH),
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

  logic [N_TREES-1:0][N_INT-1:0][FEAT_W-1:0]  feature_r;
  logic [N_TREES-1:0][N_INT-1:0][DATA_W-1:0]  threshold_r;
  logic [N_TREES-1:0][N_LEAF-1:0][CLASS_W-1:0] class_r;
  logic [N_TREES-1:0]                          tree_valid;
  logic [N_TREES-1:0][CLASS_W-1:0]             tree_class;

  assign in_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (ld_we && ld_tree < TREE_W'(N_TREES)) begin
      if (ld_leaf)
        class_r[ld_tree][ld_node] <= ld_class;
      else if (ld_node < MAX_DEPTH'(N_INT)) begin
        feature_r[ld_tree][ld_node]   <= ld_feature;
        threshold_r[ld_tree][ld_node] <= ld_threshold;
      end
    end
  end

  for (genvar t = 0; t < N_TREES; t++) begin : g_tree
    rf_tree_unrolled #(
      .MAX_DEPTH(MAX_DEPTH), .N_FEATURES(N_FEATURES), .N_CLASSES(N_CLASSES),
      .DATA_W(DATA_W), .FLOAT(FLOAT)
    ) u_tree (
      .clk, .rst_n,
      .in_valid      (in_valid),
      .in_x          (in_x),
      .node_feature  (feature_r[t]),
      .node_threshold(threshold_r[t]),
      .leaf_class    (class_r[t]),
      .out_valid     (tree_valid[t]),
      .out_class     (tree_class[t])
    );
  end

  rf_vote #(.N_TREES(N_TREES), .N_CLASSES(N_CLASSES)) u_vote (
    .clk, .rst_n,
    .in_valid  (&tree_valid)  ,
    .in_classes(tree_class),
    .out_valid,
    .out_class
  );

endmodule
