// Self-checking testbench for fixed_width_rpr, exhaustive over the 4096
// upper-half operand pairs.
//  * yr is compared with an arithmetic reference: the kept part is
//    (xh*yh - low) / 2^H, low being the partial products of the dropped
//    columns, plus the compensation count beta + (X(N/2)Y(N-1) | Cm).
//  * The reference sum must fit in N/2 bits (no overflow).
//  * Th = max |x*y - yr*2^(3N/2)| over all 2^(2N) operand pairs is
//    recomputed (the maximum lies at a corner of the low operand halves)
//    and must equal ant_pkg::ANT_TH.
//  * The truncation-error statistics that motivate the compensation hold:
//    mean error close to beta for beta > 0, and for beta = 0 below half an
//    LSB only when beta_l = 0.
//  * Precision: the mean absolute error against the expected exact product
//    (low halves uniform) must shrink from plain truncation, to ICV-only
//    compensation, to the full ICV+MICV compensation, and end below half a
//    replica LSB.
module tb_fixed_width_rpr;
  localparam int unsigned N  = ant_pkg::ANT_N;
  localparam int unsigned H  = N / 2;
  localparam int unsigned SH = 3 * N / 2;
  logic [H-1:0] xh, yh, yr;
  logic         cm;
  int checks = 0, failures = 0, n_cm = 0;
  longint low, kept, beta5, beta_l, cN, exp_yr, d, exact;
  longint th = 0;
  real mean_exact;
  real e_none = 0.0, e_icv = 0.0, e_full = 0.0;
  // mean truncation error of the uncompensated kept part, grouped by beta
  // (all N/2 products of the highest dropped column) and, for beta = 0, by
  // whether beta_l is zero
  real    t_sum [N/2+1];
  int     t_cnt [N/2+1];
  real    t0_sum [2];
  int     t0_cnt [2];
  longint beta6;

  fixed_width_rpr dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= H; k++) begin t_sum[k] = 0.0; t_cnt[k] = 0; end
    t0_sum[0] = 0.0; t0_sum[1] = 0.0; t0_cnt[0] = 0; t0_cnt[1] = 0;
    for (int a = 0; a < 2**H; a++)
      for (int b = 0; b < 2**H; b++) begin
        xh = H'(a); yh = H'(b);
        #1;
        low = 0; beta5 = 0; beta_l = 0;
        for (int i = 0; i < H; i++)
          for (int j = 0; j < H; j++)
            if (i + j < H) low += longint'({63'd0, xh[i] & yh[j]}) << (i + j);
        for (int i = 1; i < H; i++) beta5 += longint'({63'd0, xh[i] & yh[H-1-i]});
        for (int i = 0; i < H - 1; i++) beta_l += longint'({63'd0, xh[i] & yh[H-2-i]});
        kept = (longint'(a) * longint'(b) - low) >> H;
        beta6 = beta5 + longint'({63'd0, xh[0] & yh[H-1]});
        cN = ((xh[0] & yh[H-1]) || (beta5 == 0 && beta_l > 0)) ? 1 : 0;
        exp_yr = kept + beta5 + cN;
        checks++;
        if (exp_yr >= 2**H) begin
          failures++;
          $display("FAIL overflow xh=%0d yh=%0d", a, b);
        end
        checks++;
        if (longint'(yr) != exp_yr || cm != (beta5 == 0 && beta_l > 0)) begin
          failures++;
          if (failures < 10) $display("FAIL xh=%0d yh=%0d yr=%0d exp %0d", a, b, yr, exp_yr);
        end
        if (cm) n_cm++;
        // threshold: corners of the low halves
        for (int xl = 0; xl < 2; xl++)
          for (int yl = 0; yl < 2; yl++) begin
            exact = ((longint'(a) << H) + (xl != 0 ? 2**H - 1 : 0)) *
                    ((longint'(b) << H) + (yl != 0 ? 2**H - 1 : 0));
            d = exact - (longint'(yr) << SH);
            if (d < 0) d = -d;
            if (d > th) th = d;
          end
        // precision against the mean exact product, in replica LSBs
        mean_exact = (real'(a) * 2.0**H + (2.0**H - 1.0) / 2.0) *
                     (real'(b) * 2.0**H + (2.0**H - 1.0) / 2.0) / 2.0**SH;
        t_sum[int'(beta6)] += mean_exact - real'(kept);
        t_cnt[int'(beta6)]++;
        if (beta6 == 0) begin
          t0_sum[beta_l > 0] += mean_exact - real'(kept);
          t0_cnt[beta_l > 0]++;
        end
        e_none += (mean_exact - real'(kept) < 0) ? real'(kept) - mean_exact : mean_exact - real'(kept);
        e_icv  += (mean_exact - real'(kept + beta5 + longint'({63'd0, xh[0] & yh[H-1]})) < 0) ?
                  real'(kept + beta5 + longint'({63'd0, xh[0] & yh[H-1]})) - mean_exact :
                  mean_exact - real'(kept + beta5 + longint'({63'd0, xh[0] & yh[H-1]}));
        e_full += (mean_exact - real'(yr) < 0) ? real'(yr) - mean_exact : mean_exact - real'(yr);
      end
    e_none /= 2.0**(2*H); e_icv /= 2.0**(2*H); e_full /= 2.0**(2*H);
    $display("Th = %0d (package value %0d)", th, ant_pkg::ANT_TH);
    $display("mean |error| in replica LSBs: truncation %f, ICV only %f, ICV+MICV %f", e_none, e_icv, e_full);
    $display("Cm injected for %0d pairs", n_cm);
    // Truncation statistics behind the compensation: for beta > 0 the mean
    // error is within half an LSB of beta; for beta = 0 it is below half an
    // LSB when beta_l = 0 and above it when beta_l > 0.
    for (int k = 1; k <= H; k++) begin
      real m;
      m = t_sum[k] / real'(t_cnt[k]);
      $display("beta=%0d: %0d pairs, mean truncation error %f LSB", k, t_cnt[k], m);
      checks++;
      if (m - real'(k) > 0.5 || real'(k) - m > 0.5) begin failures++; $display("FAIL beta=%0d statistics", k); end
    end
    $display("beta=0, beta_l=0: mean %f; beta=0, beta_l>0: mean %f",
             t0_sum[0] / real'(t0_cnt[0]), t0_sum[1] / real'(t0_cnt[1]));
    checks++;
    if (!(t0_sum[0] / real'(t0_cnt[0]) < 0.5 && t0_sum[1] / real'(t0_cnt[1]) > 0.5)) begin
      failures++; $display("FAIL beta=0 statistics");
    end
    checks++; if (th != longint'(ant_pkg::ANT_TH)) begin failures++; $display("FAIL Th"); end
    checks++; if (!(e_full < e_icv && e_icv < e_none)) begin failures++; $display("FAIL precision order"); end
    checks++; if (!(e_full < 0.5)) begin failures++; $display("FAIL precision"); end
    checks++; if (n_cm == 0) begin failures++; $display("FAIL Cm never injected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
