// rf_tree_unrolled: one decision tree evaluated with every node in parallel.
//
// The tree is complete, of depth MAX_DEPTH, in heap order: internal node i
// tests feature node_feature[i] against node_threshold[i] and has children
// 2i+1 (taken when x <= threshold) and 2i+2; leaf k holds the class
// leaf_class[k] (the value array, which holds a class rather than a score).
// Stage 1 evaluates all 2^D-1 node comparisons at once, one rf_cmp each, and
// registers them as the comparison array. Stage 2 follows the comparison
// bits from the root down D levels to a leaf and registers its class.
// Timing: out_valid/out_class follow in_valid/in_x by two clocks; a new
// sample may enter every clock. The node and leaf arrays must stay unchanged
// while a sample is in flight. Reset (active low, synchronous) clears the
// valid bits only.
// Evaluating all comparisons at once into a comparison array is the unrolled
// scheme of the forest; the two-register pipeline is this design's choice.
module rf_tree_unrolled
  import rf_pkg::*;
#(
  parameter int unsigned MAX_DEPTH  = 5,
  parameter int unsigned N_FEATURES = 78,
  parameter int unsigned N_CLASSES  = 15,
  parameter int unsigned DATA_W     = 32,
  parameter bit          FLOAT      = 1'b1,
  localparam int unsigned N_INT     = n_internal(MAX_DEPTH),
  localparam int unsigned N_LEAF    = n_leaves(MAX_DEPTH),
  localparam int unsigned FEAT_W    = idx_w(N_FEATURES),
  localparam int unsigned CLASS_W   = idx_w(N_CLASSES)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [N_FEATURES-1:0][DATA_W-1:0]  in_x,
  input  logic [N_INT-1:0][FEAT_W-1:0]       node_feature,
  input  logic [N_INT-1:0][DATA_W-1:0]       node_threshold,
  input  logic [N_LEAF-1:0][CLASS_W-1:0]     leaf_class,
  output logic                               out_valid,
  output logic [CLASS_W-1:0]                 out_class
);

  // ---- stage 1: all node comparisons ----
  logic [N_INT-1:0] cmp_now;
  logic [N_INT-1:0] cmp_q;      // the comparison array
  logic             v1_q;

  for (genvar i = 0; i < N_INT; i++) begin : g_node
    logic [DATA_W-1:0] xsel;
    // An out-of-range feature index reads feature 0.
    assign xsel = (32'(node_feature[i]) < N_FEATURES) ? in_x[node_feature[i]] : in_x[0];
    rf_cmp #(.DATA_W(DATA_W), .FLOAT(FLOAT)) u_cmp (
      .x  (xsel),
      .thr(node_threshold[i]),
      .le (cmp_now[i])
    );
  end

  // ---- stage 2: walk the comparison array to a leaf ----
  logic [MAX_DEPTH:0] node;     // heap index, up to 2^(D+1)-2
  logic [MAX_DEPTH-1:0] leaf;

  always_comb begin
    node = '0;
    for (int l = 0; l < MAX_DEPTH; l++)
      node = cmp_q[node[MAX_DEPTH-1:0]] ? (node << 1) + (MAX_DEPTH+1)'(1) : (node << 1) + (MAX_DEPTH+1)'(2);
    leaf = MAX_DEPTH'(node - (MAX_DEPTH+1)'(N_INT));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) cmp_q     <= cmp_now;
    if (v1_q)     out_class <= leaf_class[leaf];
  end

endmodule
