// tb_rf_workloads: the evaluated forest sizes that exceed the default size.
//
// Forests of 10 trees of depth 6, and of 20, 50, 100 and 200 trees of depth
// 2 to 5, on the 78-feature, 15-class task in float, each built at its own
// size with both engines (rolled and unrolled). Every engine loads one
// random forest and classifies 20 random samples against the reference
// model (tb_rf_top_harness checks classes and latency). The smaller sizes
// run on the default build in tb_rf_top_full.
module tb_rf_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  localparam int NCFG = 12;
  localparam int CFG_NT [NCFG] = '{10, 20, 20, 20, 50, 50, 50, 100, 100, 100, 200, 200};
  localparam int CFG_D  [NCFG] = '{ 6,  2,  4,  5,  3,  4,  5,   3,   4,   5,   3,   4};

  logic done [2*NCFG];
  int   c [2*NCFG], f [2*NCFG], res [2*NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    for (genvar u = 0; u < 2; u++) begin : g_eng
      int ties, waits, b2b, lefts, rights;
      tb_rf_top_harness #(.UNROLL(u == 1), .NT(CFG_NT[g]), .D(CFG_D[g]), .NF(78), .NC(15),
                          .DW(32), .FLT(1'b1), .N_MODELS(1), .N_SAMPLES(20)) h (
        .clk, .rst_n, .done(done[2*g+u]), .checks(c[2*g+u]), .failures(f[2*g+u]),
        .results(res[2*g+u]), .ties, .waits, .back_to_back(b2b), .lefts, .rights);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all_done = 1'b1;
      foreach (done[i]) if (!done[i]) all_done = 1'b0;
    end while (!all_done);
    for (int i = 0; i < 2 * NCFG; i++) begin
      checks += c[i]; failures += f[i];
      checks++;
      if (res[i] != 20) failures++;
      $display("%0d trees, depth %0d, %s: %0d results, %0d failures",
               CFG_NT[i / 2], CFG_D[i / 2], (i % 2 == 1) ? "unrolled" : "rolled", res[i], f[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
