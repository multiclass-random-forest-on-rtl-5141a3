// tb_rf_forest_rolled: self-checking test of the rolled forest.
//
// Loads a random forest of 5 trees of depth 3 over 8 features and 4 classes
// (float) through the load port, then offers random samples. A new sample
// is often offered while the engine is still busy, so that it waits with
// in_ready low. Each out_class is compared with the reference model's
// majority vote; out_valid must be high exactly N_TREES*(MAX_DEPTH+1)+2
// clock cycles after the cycle in which the sample was accepted, and for
// one clock only. Waits on in_ready and vote ties are counted and must occur.
module tb_rf_forest_rolled;
  import tb_rf_model_pkg::*;
  localparam int NT = 5, D = 3, NF = 8, NC = 4, DW = 32;
  localparam int NI = (1 << D) - 1, NL = 1 << D;
  localparam int LAT = NT * (D + 1) + 2;
  typedef tb_rf_model_pkg::forest_model #(NT, D, NF, NC, DW, 1'b1) model_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0, stalls = 0;

  logic                  ld_we, ld_leaf;
  logic [2:0]            ld_tree;
  logic [D-1:0]          ld_node;
  logic [2:0]            ld_feature;
  logic [DW-1:0]         ld_threshold;
  logic [1:0]            ld_class;
  logic                  in_valid, in_ready, out_valid;
  logic [NF-1:0][DW-1:0] in_x;
  logic [1:0]            out_class;

  rf_forest_rolled #(.N_TREES(NT), .MAX_DEPTH(D), .N_FEATURES(NF), .N_CLASSES(NC),
                     .DATA_W(DW), .FLOAT(1'b1)) dut (.*);

  model_t m = new();
  int cyc = 0;
  always @(posedge clk) cyc++;
  int exp_q[$], cyc_q[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_model();
    for (int t = 0; t < NT; t++) begin
      for (int n = 0; n < NI; n++) begin
        @(negedge clk);
        ld_we = 1'b1; ld_leaf = 1'b0; ld_tree = 3'(t); ld_node = D'(n);
        ld_feature = 3'(m.feat[t][n]); ld_threshold = m.thr[t][n];
      end
      for (int n = 0; n < NL; n++) begin
        @(negedge clk);
        ld_we = 1'b1; ld_leaf = 1'b1; ld_tree = 3'(t); ld_node = D'(n); ld_class = 2'(m.cls[t][n]);
      end
    end
    @(negedge clk); ld_we = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_x = '0;
    ld_we = 1'b0; ld_leaf = 1'b0; ld_tree = '0; ld_node = '0; ld_feature = '0; ld_threshold = '0; ld_class = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      m.randomize_model();
      load_model();
      for (int s = 0; s < 100; s++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_x = m.rand_sample();
        if (!in_ready) stalls++;
        while (!in_ready) @(negedge clk);
        exp_q.push_back(m.predict(in_x)); cyc_q.push_back(cyc);
        @(negedge clk);
        in_valid = 1'b0;
        repeat ($urandom_range(0, LAT + 2)) @(negedge clk);
      end
      while (exp_q.size() != 0) @(negedge clk);
    end
    checks++;
    if (m.ties == 0) begin failures++; $display("no vote tie exercised"); end
    checks++;
    if (stalls == 0) begin failures++; $display("no wait on in_ready exercised"); end
    $display("vote ties: %0d, waits on in_ready: %0d", m.ties, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      if (out_class !== 2'(exp_q[0])) begin
        failures++;
        if (failures < 10) $display("class mismatch got %0d exp %0d", out_class, exp_q[0]);
      end
      checks++;
      if (cyc - cyc_q[0] != LAT) begin failures++; $display("latency %0d, expected %0d", cyc - cyc_q[0], LAT); end
      void'(exp_q.pop_front()); void'(cyc_q.pop_front());
    end
  end
endmodule
