// Self-checking testbench for rpr_comp_vector, exhaustive over the 4096
// upper-half operand pairs. The expected vector is built from full-width
// bit indices: beta counts the column-(3N/2-1) products X(N-k)Y(N/2+k-1),
// beta_l the column-(3N/2-2) products, and C(N/2) = X(N/2)Y(N-1) | Cm with
// Cm = (beta == 0) & (beta_l > 0). Also counts how often Cm fired.
module tb_rpr_comp_vector;
  localparam int unsigned N = ant_pkg::ANT_N;
  localparam int unsigned H = N / 2;
  logic [H-1:0] xh, yh, c;
  logic         cm;
  int checks = 0, failures = 0, n_cm = 0;

  rpr_comp_vector dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] X, Y;
    logic [H-1:0] exp_c;
    int beta, beta_l;
    logic exp_cm;
    for (int a = 0; a < 2**H; a++)
      for (int b = 0; b < 2**H; b++) begin
        xh = H'(a); yh = H'(b);
        X = {xh, H'(0)}; Y = {yh, H'(0)};
        #1;
        beta = 0; beta_l = 0;
        for (int k = 1; k <= H - 1; k++) begin
          exp_c[k-1] = X[N-k] & Y[H+k-1];
          beta   += int'(X[N-k] & Y[H+k-1]);
          beta_l += int'(X[N-1-k] & Y[H+k-1]);
        end
        exp_cm = (beta == 0) && (beta_l > 0);
        exp_c[H-1] = (X[H] & Y[N-1]) | exp_cm;
        checks++;
        if (c !== exp_c || cm !== exp_cm) begin
          failures++;
          if (failures < 10) $display("FAIL xh=%h yh=%h c=%b cm=%b exp %b %b", xh, yh, c, cm, exp_c, exp_cm);
        end
        if (cm) n_cm++;
      end
    checks++;
    if (n_cm == 0) begin failures++; $display("FAIL Cm never fired"); end
    $display("Cm fired for %0d of %0d pairs", n_cm, 2**(2*H));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
