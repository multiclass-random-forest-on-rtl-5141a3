// tb_rf_tree_walker: self-checking test of the rolled engine's controller.
//
// The node and leaf memories are modelled in the testbench (one-clock
// synchronous read) from a random forest of 4 trees of depth 3 over 6
// features, 16-bit fixed point. For random samples the class of every tree
// on votes is compared with the reference model, and votes_valid must be high
// exactly N_TREES*(MAX_DEPTH+1)+1 clock cycles after the cycle in which the
// sample was accepted.
// in_valid is sometimes held while the walker is busy (in_ready low) to
// check that such a sample waits and is accepted only once.
module tb_rf_tree_walker;
  import tb_rf_model_pkg::*;
  localparam int NT = 4, D = 3, NF = 6, NC = 5, DW = 16;
  localparam int NI = (1 << D) - 1, NL = 1 << D;
  localparam int LAT = NT * (D + 1) + 1;
  typedef tb_rf_model_pkg::forest_model #(NT, D, NF, NC, DW, 1'b0) model_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0, stalls = 0;

  logic                   in_valid, in_ready;
  logic [NF-1:0][DW-1:0]  in_x;
  logic                   node_rd_en, leaf_rd_en;
  logic [1:0]             node_rd_tree, leaf_rd_tree;
  logic [D-1:0]           node_rd_node, leaf_rd_node;
  logic [2:0]             node_feature;
  logic [DW-1:0]          node_threshold;
  logic [2:0]             leaf_class;
  logic                   votes_valid;
  logic [NT-1:0][2:0]     votes;

  rf_tree_walker #(.N_TREES(NT), .MAX_DEPTH(D), .N_FEATURES(NF), .N_CLASSES(NC),
                   .DATA_W(DW), .FLOAT(1'b0)) dut (.*);

  model_t m = new();

  // memory model
  always @(posedge clk) begin
    if (node_rd_en) begin
      node_feature   <= 3'(m.feat[node_rd_tree][node_rd_node]);
      node_threshold <= m.thr[node_rd_tree][node_rd_node];
    end
    if (leaf_rd_en) leaf_class <= 3'(m.cls[leaf_rd_tree][leaf_rd_node]);
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, waited;
    logic [NF-1:0][DW-1:0] x;
    rst_n = 1'b0; in_valid = 1'b0; in_x = '0;
    m.randomize_model();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 300; s++) begin
      if (s % 50 == 0) m.randomize_model();
      @(negedge clk);
      x = m.rand_sample();
      in_x = x; in_valid = 1'b1;
      waited = 0;
      while (!in_ready) begin @(negedge clk); waited++; end
      if (waited > 0) stalls++;
      t0 = cyc;                 // the cycle in which the sample is accepted
      @(negedge clk);
      // keep in_valid high on some samples while the walker is busy
      if ($urandom_range(0, 1) == 1) in_valid = 1'b0;
      in_x = m.rand_sample();
      while (!votes_valid) @(negedge clk);
      checks++;
      if (cyc - t0 != LAT) begin failures++; $display("latency %0d, expected %0d", cyc - t0, LAT); end
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (votes[t] !== 3'(m.tree_class(t, x))) begin
          failures++;
          if (failures < 10) $display("sample %0d tree %0d: got %0d exp %0d", s, t, votes[t], m.tree_class(t, x));
        end
      end
      in_valid = 1'b0;
      @(negedge clk);
      checks++;
      if (votes_valid) begin failures++; $display("votes_valid longer than one clock"); end
    end
    if (m.lefts == 0 || m.rights == 0) begin failures++; $display("branch not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
