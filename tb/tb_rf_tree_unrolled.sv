// tb_rf_tree_unrolled: self-checking test of one unrolled tree.
//
// A random tree of depth 3 over 6 features (float) is applied; random
// samples enter on random clocks, up to one per clock. Each result is
// compared with the reference model, and out_valid must be high exactly two
// clock cycles after the cycle in which in_valid was high.
module tb_rf_tree_unrolled;
  import tb_rf_model_pkg::*;
  localparam int D = 3, NF = 6, NC = 5, DW = 32;
  localparam int NI = (1 << D) - 1, NL = 1 << D;
  typedef tb_rf_model_pkg::forest_model #(1, D, NF, NC, DW, 1'b1) model_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic                      in_valid, out_valid;
  logic [NF-1:0][DW-1:0]     in_x;
  logic [NI-1:0][2:0]        node_feature;
  logic [NI-1:0][DW-1:0]     node_threshold;
  logic [NL-1:0][2:0]        leaf_class;
  logic [2:0]                out_class;

  rf_tree_unrolled #(.MAX_DEPTH(D), .N_FEATURES(NF), .N_CLASSES(NC), .DATA_W(DW), .FLOAT(1'b1)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$];
  int cyc_q[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    model_t m = new();
    int e, c;
    rst_n = 1'b0; in_valid = 1'b0; in_x = '0;
    for (int trial = 0; trial < 20; trial++) begin
      m.randomize_model();
      for (int i = 0; i < NI; i++) begin
        node_feature[i] = 3'(m.feat[0][i]); node_threshold[i] = m.thr[0][i];
      end
      for (int k = 0; k < NL; k++) leaf_class[k] = 3'(m.cls[0][k]);
      repeat (2) @(posedge clk);
      rst_n = 1'b1;
      for (int s = 0; s < 60; s++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 2) != 0);
        in_x = m.rand_sample();
        if (in_valid) begin exp_q.push_back(m.tree_class(0, in_x)); cyc_q.push_back(cyc); end
      end
      @(negedge clk); in_valid = 1'b0;
      repeat (4) @(negedge clk);
      if (exp_q.size() != 0) begin failures++; $display("results missing: %0d", exp_q.size()); end
      exp_q.delete(); cyc_q.delete();
    end
    if (m.lefts == 0 || m.rights == 0) begin failures++; $display("branch not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      if (out_class !== 3'(exp_q[0])) begin
        failures++;
        if (failures < 10) $display("class mismatch got %0d exp %0d", out_class, exp_q[0]);
      end
      checks++;
      if (cyc - cyc_q[0] != 2) begin failures++; $display("latency %0d, expected 2", cyc - cyc_q[0]); end
      void'(exp_q.pop_front()); void'(cyc_q.pop_front());
    end
  end
endmodule
