// rf_cmp: the decision of one internal tree node, le = (x <= thr).
//
// A sample goes to the left child when its feature value is less than or
// equal to the node threshold, the convention of scikit-learn trees.
// FLOAT = 1: both operands are IEEE-754 numbers of DATA_W bits (32 for
// single precision). Each is mapped to an unsigned key that orders like the
// real value (positive: sign bit set; negative: all bits inverted), and the
// keys are compared; -0 and +0 compare equal. NaN operands are not
// supported: they compare by their bit pattern.
// FLOAT = 0: both operands are two's-complement fixed-point numbers with the
// same binary point (ap_fixed<W,I>-style); the integer width does not change
// the order, so a signed compare of the raw bits is exact.
// Purely combinational. The comparison direction, the float key and the
// zero rule are this design's choices; the float and fixed-point precisions
// follow the evaluated configurations.
module rf_cmp #(
  parameter int unsigned DATA_W = 32,
  parameter bit          FLOAT  = 1'b1
) (
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] thr,
  output logic              le
);

  logic [DATA_W-1:0] kx, kt;
  logic              both_zero;

  always_comb begin
    if (FLOAT) begin
      kx = x[DATA_W-1]   ? ~x   : (x   | (DATA_W'(1) << (DATA_W-1)));
      kt = thr[DATA_W-1] ? ~thr : (thr | (DATA_W'(1) << (DATA_W-1)));
      both_zero = (x[DATA_W-2:0] == '0) && (thr[DATA_W-2:0] == '0);
      le = both_zero || (kx <= kt);
    end else begin
      kx = x;
      kt = thr;
      both_zero = 1'b0;
      le = ($signed(kx) <= $signed(kt));
    end
  end

endmodule
