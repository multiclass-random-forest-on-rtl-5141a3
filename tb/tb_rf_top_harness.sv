// tb_rf_top_harness: drives and checks one rf_top instance for tb_rf_top.
//
// Loads N_MODELS random forests in turn through the load port and, for each,
// offers N_SAMPLES random samples: with probability 3/4 a sample is offered
// in the clock right after the previous one, so the unrolled engine sees
// back-to-back samples and the rolled engine makes the sample wait
// (in_ready low). Every result is compared with the reference model, and
// the latency is checked: 3 cycles (unrolled) or N_TREES*(MAX_DEPTH+1)+2
// cycles (rolled) after the cycle in which the sample was accepted.
// Counts are reported on the output ports when done rises.
module tb_rf_top_harness #(
  parameter bit UNROLL    = 1'b0,
  parameter int NT        = 7,
  parameter int D         = 4,
  parameter int NF        = 12,
  parameter int NC        = 6,
  parameter int DW        = 32,
  parameter bit FLT       = 1'b1,
  parameter int N_MODELS  = 3,
  parameter int N_SAMPLES = 150
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   results,
  output int   ties,
  output int   waits,
  output int   back_to_back,
  output int   lefts,
  output int   rights
);
  import tb_rf_model_pkg::*;
  localparam int NI = (1 << D) - 1, NL = 1 << D;
  localparam int LAT = UNROLL ? 3 : NT * (D + 1) + 2;
  localparam int TW = (NT > 1) ? $clog2(NT) : 1;
  localparam int FW = (NF > 1) ? $clog2(NF) : 1;
  localparam int CW = (NC > 1) ? $clog2(NC) : 1;
  typedef tb_rf_model_pkg::forest_model #(NT, D, NF, NC, DW, FLT) model_t;

  logic                  ld_we, ld_leaf;
  logic [TW-1:0]         ld_tree;
  logic [D-1:0]          ld_node;
  logic [FW-1:0]         ld_feature;
  logic [DW-1:0]         ld_threshold;
  logic [CW-1:0]         ld_class;
  logic                  in_valid, in_ready, out_valid;
  logic [NF-1:0][DW-1:0] in_x;
  logic [CW-1:0]         out_class;

  rf_top #(.UNROLL(UNROLL), .N_TREES(NT), .MAX_DEPTH(D), .N_FEATURES(NF), .N_CLASSES(NC),
           .DATA_W(DW), .FLOAT(FLT)) dut (.*);

  model_t m = new();
  int cyc = 0;
  always @(posedge clk) cyc++;
  int exp_q[$], cyc_q[$];

  task automatic load_model();
    for (int t = 0; t < NT; t++) begin
      for (int n = 0; n < NI; n++) begin
        @(negedge clk);
        ld_we = 1'b1; ld_leaf = 1'b0; ld_tree = TW'(t); ld_node = D'(n);
        ld_feature = FW'(m.feat[t][n]); ld_threshold = m.thr[t][n];
      end
      for (int n = 0; n < NL; n++) begin
        @(negedge clk);
        ld_we = 1'b1; ld_leaf = 1'b1; ld_tree = TW'(t); ld_node = D'(n); ld_class = CW'(m.cls[t][n]);
      end
    end
    @(negedge clk); ld_we = 1'b0;
  endtask

  initial begin
    int last_acc;
    done = 1'b0; checks = 0; failures = 0; results = 0; waits = 0; back_to_back = 0;
    in_valid = 1'b0; in_x = '0;
    ld_we = 1'b0; ld_leaf = 1'b0; ld_tree = '0; ld_node = '0; ld_feature = '0; ld_threshold = '0; ld_class = '0;
    @(posedge rst_n);
    for (int r = 0; r < N_MODELS; r++) begin
      m.randomize_model();
      load_model();
      last_acc = -10;
      for (int s = 0; s < N_SAMPLES; s++) begin
        if ($urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          repeat ($urandom_range(1, 4)) @(negedge clk);
        end
        in_valid = 1'b1;
        in_x = m.rand_sample();
        if (!in_ready) waits++;
        while (!in_ready) @(negedge clk);
        if (cyc == last_acc + 1) back_to_back++;
        last_acc = cyc;
        exp_q.push_back(m.predict(in_x)); cyc_q.push_back(cyc);
        @(negedge clk);
      end
      in_valid = 1'b0;
      while (exp_q.size() != 0) @(negedge clk);
    end
    ties = m.ties; lefts = m.lefts; rights = m.rights;
    done = 1'b1;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    results++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      if (out_class !== CW'(exp_q[0])) begin
        failures++;
        if (failures < 10) $display("UNROLL=%0d FLOAT=%0d: class %0d, expected %0d", UNROLL, FLT, out_class, exp_q[0]);
      end
      checks++;
      if (cyc - cyc_q[0] != LAT) begin
        failures++;
        if (failures < 10) $display("UNROLL=%0d: latency %0d, expected %0d", UNROLL, cyc - cyc_q[0], LAT);
      end
      void'(exp_q.pop_front()); void'(cyc_q.pop_front());
    end
  end
endmodule
