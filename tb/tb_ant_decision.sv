// Self-checking testbench for ant_decision. Drives replica values and main
// products placed at chosen distances from yr*2^(3N/2): exactly Th and Th+1
// on both sides, plus random pairs. ya must pass when the distance is at
// most Th and be replaced by the aligned replica value otherwise. Counts
// both outcomes.
module tb_ant_decision;
  localparam int unsigned N  = ant_pkg::ANT_N;
  localparam int unsigned H  = N / 2;
  localparam int unsigned SH = 3 * N / 2;
  localparam longint TH = longint'(ant_pkg::ANT_TH);
  logic [2*N-1:0] ya, y;
  logic [H-1:0]   yr;
  logic           err;
  int checks = 0, failures = 0, n_pass = 0, n_repl = 0;

  ant_decision dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input longint r, input longint a);
    longint yrf, d;
    logic exp_err;
    logic [2*N-1:0] exp_y;
    yr = H'(r); ya = (2*N)'(a);
    #1;
    yrf = r << SH;
    d = longint'(ya) - yrf;
    if (d < 0) d = -d;
    exp_err = d > TH;
    exp_y = exp_err ? (2*N)'(yrf) : ya;
    checks++;
    if (y !== exp_y || err !== exp_err) begin
      failures++;
      if (failures < 10) $display("FAIL yr=%0d ya=%0d y=%0d err=%b", r, ya, y, err);
    end
    if (err) n_repl++; else n_pass++;
  endtask

  initial begin
    longint base, a;
    for (int r = 0; r < 2**H; r++) begin
      base = longint'(r) << SH;
      for (int k = 0; k < 4; k++) begin
        case (k)
          0: a = base + TH;
          1: a = base + TH + 1;
          2: a = base - TH;
          default: a = base - TH - 1;
        endcase
        if (a >= 0 && a < 2**(2*N)) drive(r, a);
      end
      drive(r, base);
    end
    for (int k = 0; k < 20000; k++) drive(longint'($urandom_range(2**H - 1)), longint'($urandom_range(2**(2*N) - 1)));
    checks++;
    if (n_pass == 0 || n_repl == 0) begin failures++; $display("FAIL an outcome never occurred"); end
    $display("passed %0d, replaced %0d", n_pass, n_repl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
