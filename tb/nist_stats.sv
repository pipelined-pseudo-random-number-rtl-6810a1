// nist_stats: four tests of the NIST SP800-22 suite applied to a bit stream that arrives W bits
// per clock, most significant bit first. The stream is cut into M_SEQ consecutive sequences of
// exactly N_BITS bits (a word may straddle two sequences). For each sequence the P-values of
//   0 frequency (monobit):  erfc(|S_n| / sqrt(2n)),  S_n = sum of (2b - 1)
//   1 block frequency:      igamc(N/2, chi2/2), chi2 = 4 BLK sum (pi_j - 1/2)^2 over N = n/BLK blocks
//   2 cumulative sums (forward), from z = max |S_k|, with the suite's alternating normal sums
//   3 runs:                 erfc(|V - 2n pi (1-pi)| / (2 sqrt(2n) pi (1-pi))), 0 if |pi - 1/2| >= 2/sqrt(n)
// are computed; a sequence passes a test when P >= 0.01. After M_SEQ sequences, for each test the
// proportion of passing sequences and the uniformity of its P-values are judged as the suite
// prescribes: the P-values are counted in 10 p_hist and P_T = igamc(9/2, chi2/2) must be at least
// 0.0001; the pass count must reach m (0.99 - 3 sqrt(0.0099/m)). Results go to pass[] and ok[]
// (1 when both criteria hold); done rises when all sequences are in.
module nist_stats #(
  parameter int unsigned W      = 64,
  parameter int unsigned N_BITS = 1 << 20,
  parameter int unsigned BLK    = 1 << 14,
  parameter int          M_SEQ  = 128,
  parameter string       NAME   = "stream"
) (
  input  logic         clk,
  input  logic         en,
  input  logic [W-1:0] word,
  output logic         done,
  output int           sequences,
  output int           pass [4],
  output int           ok [4]
);
  import nist_math_pkg::*;

  localparam real ALPHA = 0.01;
  localparam int  NT    = 4;
  localparam string TEST_NAME [4] = '{"frequency", "block frequency", "cumulative sums", "runs"};

  longint ones, runs, nbits, s_k, z_max, blk_ones;
  real    blk_chi;
  logic   last_bit;
  int     p_hist [NT][10];

  initial begin
    done = 1'b0; sequences = 0;
    ones = 0; runs = 0; nbits = 0; s_k = 0; z_max = 0; blk_ones = 0; blk_chi = 0.0; last_bit = 1'b0;
    for (int t = 0; t < NT; t++) begin
      pass[t] = 0; ok[t] = 0;
      for (int b = 0; b < 10; b++) p_hist[t][b] = 0;
    end
  end

  function automatic real cusum_p(input real n, input real z);
    real sum1, sum2, sn;
    sn = $sqrt(n);
    sum1 = 0.0;
    for (int k = $rtoi((-n / z + 1.0) / 4.0); k <= $rtoi((n / z - 1.0) / 4.0); k++)
      sum1 += phi(real'(4 * k + 1) * z / sn) - phi(real'(4 * k - 1) * z / sn);
    sum2 = 0.0;
    for (int k = $rtoi((-n / z - 3.0) / 4.0); k <= $rtoi((n / z - 1.0) / 4.0); k++)
      sum2 += phi(real'(4 * k + 3) * z / sn) - phi(real'(4 * k + 1) * z / sn);
    return 1.0 - sum1 + sum2;
  endfunction

  function automatic void record(input int t, input real p);
    int b;
    if (p >= ALPHA) pass[t]++;
    b = $rtoi($floor(p * 10.0));
    if (b > 9) b = 9;
    if (b < 0) b = 0;
    p_hist[t][b]++;
  endfunction

  function automatic void finish_sequence();
    real n, pi, s, p;
    n  = real'(nbits);
    pi = real'(ones) / n;
    // frequency
    s = real'(2 * ones) - n;
    record(0, erfc((s < 0.0 ? -s : s) / $sqrt(2.0 * n)));
    // block frequency (whole blocks only)
    record(1, igamc(real'(nbits / longint'(BLK)) / 2.0, 4.0 * real'(BLK) * blk_chi / 2.0));
    // cumulative sums, forward
    record(2, cusum_p(n, real'(z_max)));
    // runs
    if ((pi - 0.5 < 0.0 ? 0.5 - pi : pi - 0.5) >= 2.0 / $sqrt(n)) p = 0.0;
    else begin
      s = real'(runs) - 2.0 * n * pi * (1.0 - pi);
      p = erfc((s < 0.0 ? -s : s) / (2.0 * $sqrt(2.0 * n) * pi * (1.0 - pi)));
    end
    record(3, p);
    sequences++;
    ones = 0; runs = 0; nbits = 0; s_k = 0; z_max = 0; blk_ones = 0; blk_chi = 0.0;
  endfunction

  function automatic void judge();
    real e, chi, pt, min_prop;
    min_prop = real'(M_SEQ) * ((1.0 - ALPHA) - 3.0 * $sqrt(ALPHA * (1.0 - ALPHA) / real'(M_SEQ)));
    e = real'(M_SEQ) / 10.0;
    for (int t = 0; t < NT; t++) begin
      chi = 0.0;
      for (int b = 0; b < 10; b++) chi += (real'(p_hist[t][b]) - e) ** 2 / e;
      pt = igamc(4.5, chi / 2.0);
      ok[t] = (pt >= 0.0001 && real'(pass[t]) >= min_prop) ? 1 : 0;
      $display("%-22s %-16s pass %3d/%0d (need %.1f)  P_T %.6f  %s", NAME, TEST_NAME[t], pass[t], M_SEQ,
               min_prop, pt, ok[t] ? "ok" : "FAIL");
    end
  endfunction

  always @(posedge clk) begin
    if (en && !done) begin
      for (int i = int'(W) - 1; i >= 0 && sequences < M_SEQ; i--) begin
        ones += longint'(word[i]);
        blk_ones += longint'(word[i]);
        s_k += word[i] ? 1 : -1;
        if ((s_k < 0 ? -s_k : s_k) > z_max) z_max = (s_k < 0 ? -s_k : s_k);
        if (nbits == 0 || word[i] != last_bit) runs++;
        last_bit = word[i];
        nbits++;
        if (nbits % longint'(BLK) == 0) begin
          blk_chi += (real'(blk_ones) / real'(BLK) - 0.5) ** 2;
          blk_ones = 0;
        end
        if (nbits == longint'(N_BITS)) finish_sequence();
      end
      if (sequences >= M_SEQ) begin
        judge();
        done = 1'b1;
      end
    end
  end
endmodule
