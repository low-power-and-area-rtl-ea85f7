// End-to-end testbench of ant_multiplier at its default size (12x12).
//
// Streams random operand pairs (with gaps in in_valid) and emulated
// overscaling errors through vos_err_mask: no error, small errors in the low
// product bits (which the ANT scheme tolerates) and large errors in the high
// bits (which it must replace by the replica value). Every output is compared
// with a reference computed here: the exact product, an arithmetic model of
// the compensated replica and the threshold rule. Also checked: the result
// appears exactly two clock edges after its operands, an error-free product
// is never replaced, reset clears the outputs, and the output is always
// within 2*Th of the exact product. Counts how often each mechanism
// occurred (bypassed multiplicand columns, fully bypassed array, conditional
// compensation Cm, tolerated error, replaced output) and fails if one never
// did. Prints the output SNR with and without the ANT correction.
module tb_ant_multiplier;
  localparam int unsigned N  = ant_pkg::ANT_N;
  localparam int unsigned H  = N / 2;
  localparam int unsigned SH = 3 * N / 2;
  localparam longint TH = longint'(ant_pkg::ANT_TH);
  localparam int NSAMP = 200000;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           in_valid = 1'b0;
  logic [N-1:0]   x = '0, y = '0;
  logic [2*N-1:0] vos_err_mask = '0;
  logic           out_valid, err_detected;
  logic [2*N-1:0] p;

  ant_multiplier dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_allbypass = 0, n_cm = 0, n_tolerated = 0, n_replaced = 0, n_clean = 0;
  int cycle = 0;
  real sig = 0.0, noise_raw = 0.0, noise_ant = 0.0;

  // expected results in flight, tagged with the cycle they are due
  typedef struct {
    int             due;
    logic [2*N-1:0] p;
    logic           err;
    logic [2*N-1:0] exact;
    logic [2*N-1:0] raw;
  } exp_t;
  exp_t q[$];

  initial begin
    #(10 * (NSAMP * 2 + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Replica reference: kept columns of xh*yh (= (xh*yh - low)/2^H) plus
  // beta, X(N/2)Y(N-1) and the conditional unit.
  function automatic longint ref_rpr(logic [N-1:0] a, logic [N-1:0] b, output logic cm);
    logic [H-1:0] xh, yh;
    longint low, beta5, beta_l, c;
    xh = a[N-1:H]; yh = b[N-1:H];
    low = 0; beta5 = 0; beta_l = 0;
    for (int i = 0; i < H; i++)
      for (int j = 0; j < H; j++)
        if (i + j < H) low += longint'({63'd0, xh[i] & yh[j]}) << (i + j);
    for (int i = 1; i < H; i++)     beta5  += longint'({63'd0, xh[i] & yh[H-1-i]});
    for (int i = 0; i < H - 1; i++) beta_l += longint'({63'd0, xh[i] & yh[H-2-i]});
    cm = (beta5 == 0 && beta_l > 0);
    c = ((xh[0] & yh[H-1]) || cm) ? 1 : 0;
    return ((longint'(xh) * longint'(yh) - low) >> H) + beta5 + c;
  endfunction

  // cycle counts rising edges; inputs are driven and outputs sampled at the
  // falling edge, so neither races the design's registers.
  always @(posedge clk) cycle++;

  always @(negedge clk) begin
    if (out_valid) begin
      exp_t e;
      longint d;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (e.due != cycle || p !== e.p || err_detected !== e.err) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d (due %0d): p=%0d err=%b exp %0d %b", cycle, e.due, p, err_detected, e.p, e.err);
        end
        d = longint'(p) - longint'(e.exact);
        if (d < 0) d = -d;
        checks++;
        if (d > 2 * TH) begin
          failures++;
          $display("FAIL output %0d further than 2*Th from exact %0d", p, e.exact);
        end
        sig       += real'(e.exact) * real'(e.exact);
        noise_ant += real'(d) * real'(d);
        noise_raw += (real'(e.raw) - real'(e.exact)) * (real'(e.raw) - real'(e.exact));
      end
    end
  end

  task automatic send(input logic [N-1:0] a, input logic [N-1:0] b, input logic [2*N-1:0] m);
    exp_t e;
    longint yrf, ya, d;
    logic cm;
    @(negedge clk);
    x = a; y = b; vos_err_mask = m; in_valid = 1'b1;
    e.exact = (2*N)'(a) * (2*N)'(b);
    ya      = longint'({40'd0, e.exact ^ m});
    e.raw   = (2*N)'(ya);
    yrf     = ref_rpr(a, b, cm) << SH;
    if (cm) n_cm++;
    d       = ya - yrf;
    if (d < 0) d = -d;
    e.err   = d > TH;
    e.p     = e.err ? (2*N)'(yrf) : (2*N)'(ya);
    e.due   = cycle + 2;
    q.push_back(e);   // captured at the next edge, output after the one after
    if (a != '1) n_bypass++;
    if (a == '0) n_allbypass++;
    if (m == '0) begin
      n_clean++;
      checks++;
      if (e.err) begin failures++; $display("FAIL reference replaces a clean product"); end
    end else if (e.err) n_replaced++;
    else n_tolerated++;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    logic [N-1:0] a, b;
    logic [2*N-1:0] m;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0 || p !== '0 || err_detected !== 1'b0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    rst_n = 1'b1;
    @(posedge clk);
    send('0, 12'hABC, '0);
    send('1, '1, '0);
    send('1, '1, 24'h800000);
    for (int k = 0; k < NSAMP; k++) begin
      a = N'($urandom);
      b = N'($urandom);
      if (k % 5 == 0) a &= N'($urandom);          // sparse multiplicand
      case ($urandom_range(9))
        0, 1:    m = (2*N)'(1) << $urandom_range(2*N - 1, SH);     // high-bit error
        2, 3:    m = (2*N)'($urandom_range(2**12 - 1));            // low-bit error
        default: m = '0;
      endcase
      send(a, b, m);
      if ($urandom_range(3) == 0) idle();
    end
    idle();
    repeat (4) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("samples: clean %0d, tolerated error %0d, replaced %0d", n_clean, n_tolerated, n_replaced);
    $display("multiplicand with bypassed columns %0d, fully bypassed %0d, Cm injected %0d",
             n_bypass, n_allbypass, n_cm);
    $display("SNR without correction %0.1f dB, with ANT %0.1f dB",
             10.0 * $log10(sig / noise_raw), 10.0 * $log10(sig / noise_ant));
    checks++; if (n_bypass == 0)    begin failures++; $display("FAIL no column bypass"); end
    checks++; if (n_allbypass == 0) begin failures++; $display("FAIL no fully bypassed array"); end
    checks++; if (n_cm == 0)        begin failures++; $display("FAIL Cm never injected"); end
    checks++; if (n_tolerated == 0) begin failures++; $display("FAIL no tolerated error"); end
    checks++; if (n_replaced == 0)  begin failures++; $display("FAIL no replaced output"); end
    checks++; if (!(noise_ant < noise_raw)) begin failures++; $display("FAIL ANT did not reduce the error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
