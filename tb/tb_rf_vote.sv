// tb_rf_vote: self-checking test of the majority vote.
//
// Random class vectors for 7 trees and 5 classes (small, so that ties are
// frequent), some with out-of-range classes. The expected class is counted
// in the testbench: highest count, lowest class on a tie. Checks the result
// and that out_valid follows in_valid by exactly one clock.
module tb_rf_vote;
  localparam int NT = 7, NC = 5, CW = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0, ties = 0;

  logic                   in_valid, out_valid;
  logic [NT-1:0][CW-1:0]  in_classes;
  logic [CW-1:0]          out_class;

  rf_vote #(.N_TREES(NT), .N_CLASSES(NC)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt [NC];
    int best, bc, nbest;
    rst_n = 1'b0; in_valid = 1'b0; in_classes = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int t = 0; t < NT; t++)
        in_classes[t] = CW'($urandom_range(0, (i % 10 == 0) ? 7 : NC - 1));
      in_valid = ($urandom_range(0, 3) != 0);
      foreach (cnt[c]) cnt[c] = 0;
      for (int t = 0; t < NT; t++) if (in_classes[t] < NC) cnt[in_classes[t]]++;
      best = 0; bc = -1; nbest = 0;
      for (int c = 0; c < NC; c++) if (cnt[c] > bc) begin bc = cnt[c]; best = c; end
      for (int c = 0; c < NC; c++) if (cnt[c] == bc) nbest++;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("valid mismatch"); end
      if (in_valid) begin
        if (nbest > 1) ties++;
        checks++;
        if (out_class !== CW'(best)) begin
          failures++;
          if (failures < 10) $display("vote mismatch got %0d exp %0d", out_class, best);
        end
      end
    end
    if (ties == 0) begin failures++; $display("no tie exercised"); end
    $display("ties=%0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
