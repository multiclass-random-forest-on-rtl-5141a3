// tb_rf_top_full: rf_top at its default size, end to end.
//
// The default engine (rolled, 10 trees of depth 5, 78 float features,
// 15 classes) loads two random forests through the load port and
// classifies 100 random samples with each. Every out_class is compared
// with the reference model's majority vote, and out_valid must be high
// exactly 10*(5+1)+2 = 62 clock cycles after the cycle in which the sample
// was accepted.
// It then runs the smaller evaluated forests that fit this size: 2 trees of
// depth 2, 4 and 5 and 10 trees of depth 3 and 4. Each is padded to depth 5
// and its trees are repeated to fill the 10 slots; the results must equal
// the majority vote of the small forest itself.
module tb_rf_top_full;
  import tb_rf_model_pkg::*;
  localparam int NT = 10, D = 5, NF = 78, NC = 15, DW = 32;
  localparam int NI = (1 << D) - 1, NL = 1 << D;
  localparam int LAT = NT * (D + 1) + 2;
  typedef tb_rf_model_pkg::forest_model #(NT, D, NF, NC, DW, 1'b1) model_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic                  ld_we, ld_leaf;
  logic [3:0]            ld_tree;
  logic [D-1:0]          ld_node;
  logic [6:0]            ld_feature;
  logic [DW-1:0]         ld_threshold;
  logic [3:0]            ld_class;
  logic                  in_valid, in_ready, out_valid;
  logic [NF-1:0][DW-1:0] in_x;
  logic [3:0]            out_class;

  rf_top dut (.*);

  model_t m = new();
  int cyc = 0;
  always @(posedge clk) cyc++;
  int exp_q[$], cyc_q[$];
  int small_nt [5] = '{2, 2, 2, 10, 10};
  int small_d  [5] = '{2, 4, 5, 3, 4};

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
        ld_we = 1'b1; ld_leaf = 1'b0; ld_tree = 4'(t); ld_node = D'(n);
        ld_feature = 7'(m.feat[t][n]); ld_threshold = m.thr[t][n];
      end
      for (int n = 0; n < NL; n++) begin
        @(negedge clk);
        ld_we = 1'b1; ld_leaf = 1'b1; ld_tree = 4'(t); ld_node = D'(n); ld_class = 4'(m.cls[t][n]);
      end
    end
    @(negedge clk); ld_we = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_x = '0;
    ld_we = 1'b0; ld_leaf = 1'b0; ld_tree = '0; ld_node = '0; ld_feature = '0; ld_threshold = '0; ld_class = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 2; r++) begin
      m.randomize_model();
      load_model();
      for (int s = 0; s < 100; s++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_x = m.rand_sample();
        while (!in_ready) @(negedge clk);
        exp_q.push_back(m.predict(in_x)); cyc_q.push_back(cyc);
        @(negedge clk);
        in_valid = 1'b0;
      end
      while (exp_q.size() != 0) @(negedge clk);
    end
    foreach (small_nt[i]) begin
      m.randomize_padded(small_nt[i], small_d[i]);
      load_model();
      for (int s = 0; s < 50; s++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_x = m.rand_sample();
        while (!in_ready) @(negedge clk);
        exp_q.push_back(m.predict_small(in_x)); cyc_q.push_back(cyc);
        @(negedge clk);
        in_valid = 1'b0;
      end
      while (exp_q.size() != 0) @(negedge clk);
      $display("forest of %0d trees, depth %0d: done", small_nt[i], small_d[i]);
    end
    $display("vote ties: %0d", m.ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      if (out_class !== 4'(exp_q[0])) begin
        failures++;
        if (failures < 10) $display("class mismatch got %0d exp %0d", out_class, exp_q[0]);
      end
      checks++;
      if (cyc - cyc_q[0] != LAT) begin failures++; $display("latency %0d, expected %0d", cyc - cyc_q[0], LAT); end
      void'(exp_q.pop_front()); void'(cyc_q.pop_front());
    end
  end
endmodule
