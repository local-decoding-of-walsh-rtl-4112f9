// walsh_ref_pkg: reference models used by the testbenches, written
// directly from the definitions rather than from the RTL structure:
// the test-vector formula, the optimal decoder (argmax of the full
// correlation) and the local decoder (subset correlations, magnitudes
// summed per bit group).
package walsh_ref_pkg;
  function automatic logic [31:0] ref_hash(input logic [31:0] x);
    logic [31:0] h = x * 32'h9E3779B9 + 32'h2545F491;
    repeat (2) begin
      h = h ^ (h << 13);
      h = h ^ (h >> 17);
      h = h ^ (h << 5);
    end
    return h;
  endfunction

  function automatic int ref_word(input int c);
    return int'(ref_hash(32'(1024 + c)) & 32'h3F);
  endfunction

  function automatic int ref_chip(input int a);
    logic [31:0] h = ref_hash(32'(a));
    int w = ref_word(a / 64);
    int amp = (a >= 512) ? 42 : 74;
    int noise = int'(h[6:0]) + int'(h[14:8]) + int'(h[22:16]) + int'(h[30:24]) - 256;
    return ($countones(w & (a % 64)) % 2 != 0) ? noise - amp : noise + amp;
  endfunction

  function automatic int ref_optimal(input int x[64]);
    int best = 0, bi = 0;
    for (int k = 0; k < 64; k++) begin
      int c = 0;
      for (int j = 0; j < 64; j++) c += ($countones(k & j) % 2 != 0) ? -x[j] : x[j];
      if (k == 0 || c > best) begin best = c; bi = k; end
    end
    return bi;
  endfunction

  function automatic int ref_local(input int x[64], input int nf);
    int n = nf < 2 ? 2 : (nf > 8 ? 8 : nf);
    int best_lo = -1, best_hi = -1, ilo = 0, ihi = 0;
    for (int k = 0; k < 8; k++) begin
      int slo = 0, shi = 0;
      for (int m = 0; m < (n + 1) / 2; m++) begin
        int c = 0;
        for (int j = 0; j < 8; j++) c += ($countones(k & j) % 2 != 0) ? -x[8*m + j] : x[8*m + j];
        slo += c < 0 ? -c : c;
      end
      for (int m = 0; m < n / 2; m++) begin
        int c = 0;
        for (int j = 0; j < 8; j++) c += ($countones(k & j) % 2 != 0) ? -x[8*j + m] : x[8*j + m];
        shi += c < 0 ? -c : c;
      end
      if (slo > best_lo) begin best_lo = slo; ilo = k; end
      if (shi > best_hi) begin best_hi = shi; ihi = k; end
    end
    return ihi * 8 + ilo;
  endfunction
endpackage
