// Algorithmic-noise-tolerant (ANT) NxN multiplier with a fixed-width
// reduced-precision replica.
//
// The main block (column_bypass_mult) computes the exact 2N-bit product and
// is meant to run at an overscaled, too-low supply voltage, where its long
// paths may miss the sampling edge and corrupt the result. A small replica
// (fixed_width_rpr) computes an N/2-bit estimate of the top of the product
// from the upper operand halves; it is short enough to stay correct. The
// decision block (ant_decision) keeps the main product unless it lies more
// than TH away from the estimate, in which case the estimate is output.
//
// Timing (this design's choice): x and y are registered when in_valid is
// high, both multipliers evaluate in the following cycle, and the selected
// result is registered at the next edge: p, err_detected and out_valid
// appear two clock edges after the operands, one result per cycle.
// Asynchronous active-low reset clears the valid flags and the data.
//
// vos_err_mask emulates the timing errors of voltage overscaling, which
// logic cannot reproduce: it is XORed onto the main product before the
// decision. It is a test hook of this design and is tied to 0 in use.
module ant_multiplier #(
  parameter int unsigned N  = ant_pkg::ANT_N,
  parameter longint unsigned TH = ant_pkg::ant_threshold(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic [2*N-1:0] vos_err_mask,
  output logic           out_valid,
  output logic [2*N-1:0] p,
  output logic           err_detected
);
  logic [N-1:0]   x_q, y_q;
  logic [2*N-1:0] mask_q;
  logic           v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '0;
      y_q    <= '0;
      mask_q <= '0;
      v_q    <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        x_q    <= x;
        y_q    <= y;
        mask_q <= vos_err_mask;
      end
    end
  end

  logic [2*N-1:0] ya_exact, ya, y_sel;
  logic [N/2-1:0] yr;
  logic           rpr_cm;   // replica's Cm monitor, not used here
  logic           err;

  column_bypass_mult #(.N(N)) u_mdsp (
    .x(x_q),
    .y(y_q),
    .p(ya_exact)
  );

  assign ya = ya_exact ^ mask_q;

  fixed_width_rpr #(.N(N)) u_rpr (
    .xh(x_q[N-1:N/2]),
    .yh(y_q[N-1:N/2]),
    .yr(yr),
    .cm(rpr_cm)
  );

  ant_decision #(.N(N), .TH(TH)) u_dec (
    .ya (ya),
    .yr (yr),
    .y  (y_sel),
    .err(err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p            <= '0;
      err_detected <= 1'b0;
      out_valid    <= 1'b0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        p            <= y_sel;
        err_detected <= err;
      end
    end
  end
endmodule
