// tb_rf_cmp: self-checking test of the node comparator.
//
// Float instance (32-bit): random pairs drawn from a small grid of values
// (so that equal operands, signed zeros and sign changes all occur) and
// from random non-NaN bit patterns, including infinities. The expected
// result is computed from the exact real values of the operands. Fixed-point instance
// (16 bits, 10 fraction bits as in ap_fixed<16,6>): random pairs, expected
// result from real arithmetic on the scaled values.
module tb_rf_cmp;
  import tb_rf_model_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0] fx, ft;
  logic        fle;
  logic [15:0] qx, qt;
  logic        qle;

  rf_cmp #(.DATA_W(32), .FLOAT(1'b1)) u_f (.x(fx), .thr(ft), .le(fle));
  rf_cmp #(.DATA_W(16), .FLOAT(1'b0)) u_q (.x(qx), .thr(qt), .le(qle));

  function automatic logic [31:0] grid_float();
    return f32_quarter(int'($urandom_range(0, 40)) - 20);
  endfunction

  function automatic logic [31:0] any_float();
    logic [31:0] b;
    do b = $urandom; while (b[30:23] == 8'hFF && b[22:0] != 0);
    return b;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      if (i % 2 == 0) begin fx = grid_float(); ft = grid_float(); end
      else if (i % 4 == 1) begin fx = any_float(); ft = any_float(); end
      else begin fx = any_float(); ft = fx; if (i % 8 == 3) ft[0] = ~ft[0]; end
      qx = 16'($urandom); qt = (i % 3 == 0) ? qx : 16'($urandom);
      #1;
      checks++;
      if (fle !== (f32_to_real(fx) <= f32_to_real(ft))) begin
        failures++;
        if (failures < 10) $display("float mismatch x=%h t=%h le=%b", fx, ft, fle);
      end
      checks++;
      if (qle !== (real'($signed(qx)) / 1024.0 <= real'($signed(qt)) / 1024.0)) begin
        failures++;
        if (failures < 10) $display("fixed mismatch x=%h t=%h le=%b", qx, qt, qle);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
