// rf_vote: majority vote over the classes predicted by the trees.
//
// Every tree gives one class; the vote counts, for each class, how many
// trees chose it and outputs the class with the highest count. A tie goes
// to the lowest class index. A tree class of N_CLASSES or above is not
// counted. Counting and selection are combinational; the result is
// registered, so out_valid/out_class follow in_valid/in_classes by one
// clock. Reset (active low, synchronous) clears out_valid.
// The majority rule follows the forest's voting; the tie rule, the range
// check and the one-cycle latency are this design's choices.
module rf_vote
  import rf_pkg::*;
#(
  parameter int unsigned N_TREES   = 10,
  parameter int unsigned N_CLASSES = 15,
  localparam int unsigned CLASS_W  = idx_w(N_CLASSES),
  localparam int unsigned CNT_W    = idx_w(N_TREES + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic [N_TREES-1:0][CLASS_W-1:0]  in_classes,
  output logic                             out_valid,
  output logic [CLASS_W-1:0]               out_class
);

  logic [N_CLASSES-1:0][CNT_W-1:0] count;
  logic [CLASS_W-1:0]              best;
  logic [CNT_W-1:0]                best_cnt;

  always_comb begin
    count = '0;
    for (int t = 0; t < N_TREES; t++)
      for (int c = 0; c < N_CLASSES; c++)
        if (in_classes[t] == CLASS_W'(c))
          count[c] = count[c] + CNT_W'(1);
    best     = '0;
    best_cnt = count[0];
    for (int c = 1; c < N_CLASSES; c++)
      if (count[c] > best_cnt) begin
        best     = CLASS_W'(c);
        best_cnt = count[c];
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_class <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        out_class <= best;
    end
  end

endmodule
