// Decision block of the ANT multiplier (error detection and correction).
//
// Compares the main product ya with the replica output yr, aligned to the
// same weight (yr * 2^(3N/2)). If |ya - yr| is at most the threshold TH the
// main product is trusted and passed on; otherwise ya is taken to hold a
// soft error and the replica value is output instead, with err = 1. TH is
// the largest distance an error-free product can have from the replica, so
// a correct ya is never replaced; its default is computed from that
// definition by ant_pkg::ant_threshold. The equal case keeps ya.
// Purely combinational.
module ant_decision #(
  parameter int unsigned N  = ant_pkg::ANT_N,
  parameter longint unsigned TH = ant_pkg::ant_threshold(N)
) (
  input  logic [2*N-1:0] ya,
  input  logic [N/2-1:0] yr,
  output logic [2*N-1:0] y,
  output logic           err
);
  localparam int unsigned SH = 3 * N / 2;

  logic [2*N-1:0] yr_full, diff;

  always_comb begin
    yr_full = {yr, {SH{1'b0}}};
    diff    = (ya >= yr_full) ? ya - yr_full : yr_full - ya;
    err     = diff > (2*N)'(TH);
    y       = err ? yr_full : ya;
  end
endmodule
