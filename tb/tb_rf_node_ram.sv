// tb_rf_node_ram: self-checking test of the rolled engine's model memories.
//
// Fills the node and leaf memories of 3 trees of depth 3 through the load
// port with random words, then reads random addresses on both ports at
// once and checks that the data appear one clock after the request and
// hold while no read is requested. Finally rewrites some words and checks
// them again.
module tb_rf_node_ram;
  localparam int NT = 3, D = 3, NF = 6, NC = 5, DW = 16;
  localparam int NI = (1 << D) - 1, NL = 1 << D;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          ld_we, ld_leaf;
  logic [1:0]    ld_tree;
  logic [D-1:0]  ld_node;
  logic [2:0]    ld_feature;
  logic [DW-1:0] ld_threshold;
  logic [2:0]    ld_class;
  logic          node_rd_en, leaf_rd_en;
  logic [1:0]    node_rd_tree, leaf_rd_tree;
  logic [D-1:0]  node_rd_node, leaf_rd_node;
  logic [2:0]    node_feature;
  logic [DW-1:0] node_threshold;
  logic [2:0]    leaf_class;

  rf_node_ram #(.N_TREES(NT), .MAX_DEPTH(D), .N_FEATURES(NF), .N_CLASSES(NC), .DATA_W(DW)) dut (.*);

  int            feat [NT][NI];
  logic [DW-1:0] thr  [NT][NI];
  int            cls  [NT][NL];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_node(int t, int n);
    @(negedge clk);
    ld_we = 1'b1; ld_leaf = 1'b0; ld_tree = 2'(t); ld_node = D'(n);
    ld_feature = 3'(feat[t][n]); ld_threshold = thr[t][n];
    @(negedge clk); ld_we = 1'b0;
  endtask

  task automatic write_leaf(int t, int n);
    @(negedge clk);
    ld_we = 1'b1; ld_leaf = 1'b1; ld_tree = 2'(t); ld_node = D'(n); ld_class = 3'(cls[t][n]);
    @(negedge clk); ld_we = 1'b0;
  endtask

  task automatic read_check(int n_reads);
    int nt, nn, lt, ln;
    bit ren, len;
    for (int i = 0; i < n_reads; i++) begin
      @(negedge clk);
      nt = $urandom_range(0, NT - 1); nn = $urandom_range(0, NI - 1);
      lt = $urandom_range(0, NT - 1); ln = $urandom_range(0, NL - 1);
      node_rd_en = 1'b1; node_rd_tree = 2'(nt); node_rd_node = D'(nn);
      leaf_rd_en = 1'b1; leaf_rd_tree = 2'(lt); leaf_rd_node = D'(ln);
      @(negedge clk);
      // a clock with no read request must not change the outputs
      ren = ($urandom_range(0, 1) == 1);
      node_rd_en = 1'b0; leaf_rd_en = 1'b0;
      node_rd_tree = 2'($urandom_range(0, NT - 1)); node_rd_node = D'($urandom_range(0, NI - 1));
      leaf_rd_tree = 2'($urandom_range(0, NT - 1)); leaf_rd_node = D'($urandom_range(0, NL - 1));
      if (ren) @(negedge clk);
      checks += 3;
      if (node_feature !== 3'(feat[nt][nn])) begin failures++; $display("feature mismatch t%0d n%0d", nt, nn); end
      if (node_threshold !== thr[nt][nn]) begin failures++; $display("threshold mismatch t%0d n%0d", nt, nn); end
      if (leaf_class !== 3'(cls[lt][ln])) begin failures++; $display("class mismatch t%0d n%0d", lt, ln); end
    end
  endtask

  initial begin
    ld_we = 1'b0; ld_leaf = 1'b0; ld_tree = '0; ld_node = '0; ld_feature = '0; ld_threshold = '0; ld_class = '0;
    node_rd_en = 1'b0; leaf_rd_en = 1'b0; node_rd_tree = '0; node_rd_node = '0; leaf_rd_tree = '0; leaf_rd_node = '0;
    for (int t = 0; t < NT; t++) begin
      for (int n = 0; n < NI; n++) begin
        feat[t][n] = $urandom_range(0, NF - 1); thr[t][n] = DW'($urandom);
        write_node(t, n);
      end
      for (int n = 0; n < NL; n++) begin
        cls[t][n] = $urandom_range(0, NC - 1);
        write_leaf(t, n);
      end
    end
    read_check(300);
    for (int i = 0; i < 10; i++) begin
      int t = $urandom_range(0, NT - 1), n = $urandom_range(0, NI - 1), l = $urandom_range(0, NL - 1);
      feat[t][n] = $urandom_range(0, NF - 1); thr[t][n] = DW'($urandom); write_node(t, n);
      cls[t][l] = $urandom_range(0, NC - 1); write_leaf(t, l);
    end
    read_check(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
