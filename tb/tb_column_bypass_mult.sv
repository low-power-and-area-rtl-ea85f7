// Self-checking testbench for column_bypass_mult.
// A 6x6 instance is checked exhaustively; the full 12x12 instance is checked
// on corner cases, on operands with many zero multiplicand bits (heavy
// column bypass) and on random operands, against the * operator.
module tb_column_bypass_mult;
  localparam int unsigned N = ant_pkg::ANT_N;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  logic [5:0]     xs, ys;
  logic [11:0]    ps;
  int checks = 0, failures = 0;

  column_bypass_mult dut (.x(x), .y(y), .p(p));
  column_bypass_mult #(.N(6)) dut6 (.x(xs), .y(ys), .p(ps));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check12(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [2*N-1:0] exp;
    x = a; y = b;
    #1;
    exp = (2*N)'(a) * (2*N)'(b);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d = %0d, exp %0d", a, b, p, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        xs = 6'(a); ys = 6'(b);
        #1;
        checks++;
        if (ps !== 12'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL6 %0d*%0d = %0d", a, b, ps);
        end
      end
    check12('0, '0);
    check12('1, '1);
    check12('1, '0);
    check12('0, '1);
    check12(12'h800, 12'hFFF);
    check12(12'hFFF, 12'h001);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) check12(N'(1) << i, N'(1) << j);
    // sparse multiplicands: most columns bypassed
    for (int k = 0; k < 20000; k++)
      check12(N'($urandom) & N'($urandom) & N'($urandom), N'($urandom));
    for (int k = 0; k < 100000; k++) check12(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
