// rf_tree_walker: controller of the rolled forest engine.
//
// One sample at a time: in_ready is high while idle; when in_valid is seen
// the feature vector is latched and the trees are visited one after another.
// For each tree the walker starts at the root (heap node 0) and descends one
// level per clock: it requests the node word from the node memory, and when
// the word returns (next clock) it selects the tested feature, compares it
// with the threshold (rf_cmp, x <= threshold goes left) and requests the
// next node, or, after MAX_DEPTH levels, the leaf. The clock the leaf class
// returns, it is stored for that tree and the root of the next tree is
// requested. After the last tree, votes_valid pulses for one clock with the
// class of every tree on votes.
// Timing: a tree takes MAX_DEPTH+1 clocks; votes_valid is high
// N_TREES*(MAX_DEPTH+1)+1 clock cycles after the cycle in which the sample
// was accepted.
// The memories must have a one-clock synchronous read (rf_node_ram).
// Reset (active low, synchronous) returns to idle.
// Visiting the trees one after another is the rolled scheme; the schedule
// and the handshake are this design's choices.
module rf_tree_walker
  import rf_pkg::*;
#(
  parameter int unsigned N_TREES    = 10,
  parameter int unsigned MAX_DEPTH  = 5,
  parameter int unsigned N_FEATURES = 78,
  parameter int unsigned N_CLASSES  = 15,
  parameter int unsigned DATA_W     = 32,
  parameter bit          FLOAT      = 1'b1,
  localparam int unsigned N_INT     = n_internal(MAX_DEPTH),
  localparam int unsigned TREE_W    = idx_w(N_TREES),
  localparam int unsigned FEAT_W    = idx_w(N_FEATURES),
  localparam int unsigned CLASS_W   = idx_w(N_CLASSES),
  localparam int unsigned LVL_W     = idx_w(MAX_DEPTH)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // sample input
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [N_FEATURES-1:0][DATA_W-1:0] in_x,
  // node memory read port
  output logic                              node_rd_en,
  output logic [TREE_W-1:0]                 node_rd_tree,
  output logic [MAX_DEPTH-1:0]              node_rd_node,
  input  logic [FEAT_W-1:0]                 node_feature,
  input  logic [DATA_W-1:0]                 node_threshold,
  // leaf memory read port
  output logic                              leaf_rd_en,
  output logic [TREE_W-1:0]                 leaf_rd_tree,
  output logic [MAX_DEPTH-1:0]              leaf_rd_node,
  input  logic [CLASS_W-1:0]                leaf_class,
  // classes of all trees, to the vote
  output logic                              votes_valid,
  output logic [N_TREES-1:0][CLASS_W-1:0]   votes
);

  typedef enum logic [1:0] {S_IDLE, S_NODE, S_LEAF} state_t;

  state_t                            state;
  logic [N_FEATURES-1:0][DATA_W-1:0] x_q;
  logic [TREE_W-1:0]                 tree;
  logic [LVL_W-1:0]                  level;
  logic [MAX_DEPTH-1:0]              node;      // heap index of the node being read
  logic [MAX_DEPTH:0]                next_node; // heap index of its chosen child
  logic [DATA_W-1:0]                 xsel;
  logic                              go_left;
  logic                              last_level;
  logic                              last_tree;

  assign xsel       = (32'(node_feature) < N_FEATURES) ? x_q[node_feature] : x_q[0];
  assign last_level = (level == LVL_W'(MAX_DEPTH - 1));
  assign last_tree  = (tree == TREE_W'(N_TREES - 1));
  assign in_ready   = (state == S_IDLE);

  rf_cmp #(.DATA_W(DATA_W), .FLOAT(FLOAT)) u_cmp (
    .x  (xsel),
    .thr(node_threshold),
    .le (go_left)
  );

  assign next_node = go_left ? ({1'b0, node} << 1) + (MAX_DEPTH+1)'(1) : ({1'b0, node} << 1) + (MAX_DEPTH+1)'(2);

  // Read requests, issued combinationally from the current state.
  always_comb begin
    node_rd_en   = 1'b0;
    node_rd_tree = tree;
    node_rd_node = '0;
    leaf_rd_en   = 1'b0;
    leaf_rd_tree = tree;
    leaf_rd_node = MAX_DEPTH'(next_node - (MAX_DEPTH+1)'(N_INT));
    unique case (state)
      S_IDLE: begin
        node_rd_en   = in_valid;
        node_rd_tree = '0;
      end
      S_NODE: begin
        if (last_level) leaf_rd_en = 1'b1;
        else begin
          node_rd_en   = 1'b1;
          node_rd_node = MAX_DEPTH'(next_node);
        end
      end
      S_LEAF: begin
        node_rd_en   = !last_tree;
        node_rd_tree = tree + 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      tree        <= '0;
      level       <= '0;
      node        <= '0;
      votes_valid <= 1'b0;
    end else begin
      votes_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          x_q   <= in_x;
          tree  <= '0;
          level <= '0;
          node  <= '0;
          state <= S_NODE;
        end
        S_NODE: begin
          if (last_level) state <= S_LEAF;
          else begin
            level <= level + 1'b1;
            node  <= MAX_DEPTH'(next_node);
          end
        end
        S_LEAF: begin
          votes[tree] <= leaf_class;
          level       <= '0;
          node        <= '0;
          if (last_tree) begin
            votes_valid <= 1'b1;
            state       <= S_IDLE;
          end else begin
            tree  <= tree + 1'b1;
            state <= S_NODE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
