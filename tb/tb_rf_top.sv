// tb_rf_top: end-to-end test of the random-forest engine.
//
// Six engines of 7 trees of depth 4 over 12 features and 6 classes run
// side by side: rolled and unrolled, each in 32-bit float and in 16-bit
// fixed point (ap_fixed<16,6> format), plus a rolled 12-bit and an unrolled
// 8-bit fixed-point engine (ap_fixed<12,6> and <8,6>-style: the model draws
// values k/4, so 6 integer bits are used in every width). Each loads three random forests
// through the load port and classifies random samples against the
// reference model (tb_rf_top_harness). Every mechanism must occur at least
// once, or a failure is counted: rolled and unrolled results, float and
// fixed-point results, left and right branches, vote ties, samples waiting
// on in_ready (rolled) and back-to-back samples (unrolled).
module tb_rf_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  localparam int N = 6;
  logic done [N];
  int c [N], f [N], res [N], ties [N], waits [N], b2b [N], lefts [N], rights [N];

  tb_rf_top_harness #(.UNROLL(1'b0), .DW(32), .FLT(1'b1)) h_rf (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]),
    .results(res[0]), .ties(ties[0]), .waits(waits[0]), .back_to_back(b2b[0]), .lefts(lefts[0]), .rights(rights[0]));
  tb_rf_top_harness #(.UNROLL(1'b1), .DW(32), .FLT(1'b1)) h_uf (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]),
    .results(res[1]), .ties(ties[1]), .waits(waits[1]), .back_to_back(b2b[1]), .lefts(lefts[1]), .rights(rights[1]));
  tb_rf_top_harness #(.UNROLL(1'b0), .DW(16), .FLT(1'b0)) h_rq (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]),
    .results(res[2]), .ties(ties[2]), .waits(waits[2]), .back_to_back(b2b[2]), .lefts(lefts[2]), .rights(rights[2]));
  tb_rf_top_harness #(.UNROLL(1'b1), .DW(16), .FLT(1'b0)) h_uq (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]),
    .results(res[3]), .ties(ties[3]), .waits(waits[3]), .back_to_back(b2b[3]), .lefts(lefts[3]), .rights(rights[3]));
  tb_rf_top_harness #(.UNROLL(1'b0), .DW(12), .FLT(1'b0)) h_r12 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]),
    .results(res[4]), .ties(ties[4]), .waits(waits[4]), .back_to_back(b2b[4]), .lefts(lefts[4]), .rights(rights[4]));
  tb_rf_top_harness #(.UNROLL(1'b1), .DW(8), .FLT(1'b0)) h_u8 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]),
    .results(res[5]), .ties(ties[5]), .waits(waits[5]), .back_to_back(b2b[5]), .lefts(lefts[5]), .rights(rights[5]));

  task automatic need(string what, int count);
    checks++;
    $display("  %-32s %0d", what, count);
    if (count == 0) begin failures++; $display("  mechanism never exercised: %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    need("rolled float results",         res[0]);
    need("unrolled float results",       res[1]);
    need("rolled fixed-point results",   res[2]);
    need("unrolled fixed-point results", res[3]);
    need("rolled 12-bit fixed results",  res[4]);
    need("unrolled 8-bit fixed results", res[5]);
    need("rolled samples waiting",       waits[0] + waits[2] + waits[4]);
    need("unrolled back-to-back samples", b2b[1] + b2b[3] + b2b[5]);
    need("vote ties",                    ties.sum());
    need("left branches",                lefts.sum());
    need("right branches",               rights.sum());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
