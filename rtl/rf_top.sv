// rf_top: multiclass random-forest inference engine.
//
// A forest of N_TREES complete decision trees of depth MAX_DEPTH classifies
// a sample of N_FEATURES values (IEEE-754 single when FLOAT = 1, signed
// fixed point of DATA_W bits when FLOAT = 0) into one of N_CLASSES classes
// by majority vote of the trees. Each tree keeps, per internal node, the
// index of the tested feature and a threshold, and per leaf a class.
// UNROLL selects the engine:
//   0  rolled   (rf_forest_rolled): one walker visits the trees in turn;
//      one sample at a time, out_valid N_TREES*(MAX_DEPTH+1)+2 cycles after
//      the cycle in which the sample is accepted (62 for 10 trees of depth 5).
//   1  unrolled (rf_forest_unrolled): all comparisons of all trees at once;
//      one sample per clock, out_valid 3 cycles after the cycle in which
//      the sample is presented.
// Model load port: ld_we writes one internal node (ld_leaf = 0: ld_feature,
// ld_threshold) or one leaf (ld_leaf = 1: ld_class) of tree ld_tree at heap
// index ld_node. Load the model before sending samples.
// Clock clk, active-low synchronous reset rst_n.
// The sizes default to the 78-feature, 15-class network-intrusion task with
// 10 trees of depth 5 in float; the interface is this design's own.
module rf_top
  import rf_pkg::*;
#(
  parameter bit          UNROLL     = 1'b0,
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
  input  logic                              ld_we,
  input  logic                              ld_leaf,
  input  logic [TREE_W-1:0]                 ld_tree,
  input  logic [MAX_DEPTH-1:0]              ld_node,
  input  logic [FEAT_W-1:0]                 ld_feature,
  input  logic [DATA_W-1:0]                 ld_threshold,
  input  logic [CLASS_W-1:0]                ld_class,
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [N_FEATURES-1:0][DATA_W-1:0] in_x,
  output logic                              out_valid,
  output logic [CLASS_W-1:0]                out_class
);

  if (UNROLL) begin : g_unrolled
    rf_forest_unrolled #(
      .N_TREES(N_TREES), .MAX_DEPTH(MAX_DEPTH), .N_FEATURES(N_FEATURES),
      .N_CLASSES(N_CLASSES), .DATA_W(DATA_W), .FLOAT(FLOAT)
    ) u_forest (.*);
  end else begin : g_rolled
    rf_forest_rolled #(
      .N_TREES(N_TREES), .MAX_DEPTH(MAX_DEPTH), .N_FEATURES(N_FEATURES),
      .N_CLASSES(N_CLASSES), .DATA_W(DATA_W), .FLOAT(FLOAT)
    ) u_forest (.*);
  end

endmodule
