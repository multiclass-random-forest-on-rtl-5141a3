// tb_rf_model_pkg: reference model of a random forest for the testbenches.
//
// forest_model holds a random forest in the same complete-tree layout the
// RTL uses (internal node i has children 2i+1, taken when x <= threshold,
// and 2i+2; leaf k is heap node k + 2^D - 1) and computes tree classes and
// the majority vote with plain arithmetic: exact real values of float
// data, real comparisons of the scaled integers for fixed-point data. Values
// are drawn from a small grid (k/4, k in -20..20) so that a feature often
// equals its threshold.
package tb_rf_model_pkg;

  // IEEE-754 single-precision bits of k/4, built field by field; k = 0 gives
  // +0 or -0 at random.
  function automatic logic [31:0] f32_quarter(int k);
    int a, p;
    logic [31:0] b;
    if (k == 0) begin
      b = '0;
      a = $urandom;
      b[31] = a[0];
      return b;
    end
    a = (k < 0) ? -k : k;
    p = 0;
    while ((a >> (p + 1)) != 0) p++;
    b[31]    = (k < 0);
    b[30:23] = 8'(127 + p - 2);
    b[22:0]  = 23'((a << (23 - p)) & 32'h7F_FFFF);
    return b;
  endfunction

  // Exact real value of IEEE-754 single-precision bits (no NaN).
  function automatic real f32_to_real(logic [31:0] b);
    real mag;
    int  e;
    if (b[30:23] == 8'hFF) return b[31] ? -1.0e300 : 1.0e300;
    if (b[30:23] == 8'h00) begin
      mag = real'(b[22:0]);
      e   = -149;
    end else begin
      mag = real'({1'b1, b[22:0]});
      e   = int'(b[30:23]) - 150;
    end
    while (e > 0) begin mag = mag * 2.0; e--; end
    while (e < 0) begin mag = mag / 2.0; e++; end
    return b[31] ? -mag : mag;
  endfunction

  class forest_model #(
    int NT  = 10,
    int D   = 5,
    int NF  = 78,
    int NC  = 15,
    int DW  = 32,
    bit FLT = 1'b1
  );
    localparam int NI = (1 << D) - 1;
    localparam int NL = 1 << D;
    typedef logic [NF-1:0][DW-1:0] sample_t;

    int            feat [NT][NI];
    logic [DW-1:0] thr  [NT][NI];
    int            cls  [NT][NL];
    int            ties;
    int            lefts, rights;

    // A smaller forest (s_nt trees of depth s_d) and its padded image.
    int            s_nt, s_d;
    int            s_feat [NT][NI];
    logic [DW-1:0] s_thr  [NT][NI];
    int            s_cls  [NT][NL];

    function new();
      ties = 0; lefts = 0; rights = 0;
    endfunction

    static function int level_of(int n);
      int l = 0;
      while (n > 0) begin n = (n - 1) / 2; l++; end
      return l;
    endfunction

    // A value k/4 in the data format.
    function logic [DW-1:0] value_of(int k);
      if (FLT) return DW'(f32_quarter(k));
      return DW'(k) << (DW - 8);      // ap_fixed<DW,6>: DW-6 fraction bits
    endfunction

    function logic [DW-1:0] rand_value();
      return value_of(int'($urandom_range(0, 40)) - 20);
    endfunction

    function real to_real(logic [DW-1:0] v);
      if (FLT) return f32_to_real(32'(v));
      return real'($signed(v)) / real'(64'(1) << (DW - 6));
    endfunction

    function void randomize_model(int nc_used = NC);
      for (int t = 0; t < NT; t++) begin
        for (int i = 0; i < NI; i++) begin
          feat[t][i] = $urandom_range(0, NF - 1);
          thr[t][i]  = rand_value();
        end
        for (int k = 0; k < NL; k++) cls[t][k] = $urandom_range(0, nc_used - 1);
      end
    endfunction

    // Draws a random forest of snt trees of depth sd (snt dividing NT,
    // sd <= D) and stores its image for the full-size arrays: tree t is a
    // copy of small tree t % snt; nodes below depth sd get random contents
    // and every leaf takes the class of its depth-sd ancestor.
    function void randomize_padded(int snt, int sd, int nc_used = NC);
      int n;
      s_nt = snt; s_d = sd;
      for (int t = 0; t < snt; t++) begin
        for (int i = 0; i < (1 << sd) - 1; i++) begin
          s_feat[t][i] = $urandom_range(0, NF - 1);
          s_thr[t][i]  = rand_value();
        end
        for (int k = 0; k < (1 << sd); k++) s_cls[t][k] = $urandom_range(0, nc_used - 1);
      end
      for (int t = 0; t < NT; t++) begin
        for (int i = 0; i < NI; i++) begin
          if (level_of(i) < sd) begin
            feat[t][i] = s_feat[t % snt][i];
            thr[t][i]  = s_thr[t % snt][i];
          end else begin
            feat[t][i] = $urandom_range(0, NF - 1);
            thr[t][i]  = rand_value();
          end
        end
        for (int k = 0; k < NL; k++) begin
          n = k + NI;
          while (level_of(n) > sd) n = (n - 1) / 2;
          cls[t][k] = s_cls[t % snt][n - ((1 << sd) - 1)];
        end
      end
    endfunction

    // Majority vote of the small forest alone.
    function int predict_small(sample_t x);
      int cnt [NC];
      int best, bc, n;
      foreach (cnt[c]) cnt[c] = 0;
      for (int t = 0; t < s_nt; t++) begin
        n = 0;
        for (int l = 0; l < s_d; l++)
          n = (to_real(x[s_feat[t][n]]) <= to_real(s_thr[t][n])) ? 2 * n + 1 : 2 * n + 2;
        cnt[s_cls[t][n - ((1 << s_d) - 1)]]++;
      end
      best = 0; bc = -1;
      for (int c = 0; c < NC; c++) if (cnt[c] > bc) begin bc = cnt[c]; best = c; end
      return best;
    endfunction

    function sample_t rand_sample();
      sample_t x;
      for (int f = 0; f < NF; f++) x[f] = rand_value();
      return x;
    endfunction

    function int tree_class(int t, sample_t x);
      int n = 0;
      for (int l = 0; l < D; l++) begin
        if (to_real(x[feat[t][n]]) <= to_real(thr[t][n])) begin
          n = 2 * n + 1; lefts++;
        end else begin
          n = 2 * n + 2; rights++;
        end
      end
      return cls[t][n - NI];
    endfunction

    function int predict(sample_t x);
      int cnt [NC];
      int best, bc, nbest;
      foreach (cnt[c]) cnt[c] = 0;
      for (int t = 0; t < NT; t++) cnt[tree_class(t, x)]++;
      best = 0; bc = -1; nbest = 0;
      for (int c = 0; c < NC; c++) if (cnt[c] > bc) begin bc = cnt[c]; best = c; end
      for (int c = 0; c < NC; c++) if (cnt[c] == bc) nbest++;
      if (nbest > 1) ties++;
      return best;
    endfunction
  endclass

endpackage
