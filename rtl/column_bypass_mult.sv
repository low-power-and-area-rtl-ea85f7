// Column-bypassing array multiplier: the main block (MDSP) of the ANT
// multiplier.
//
// Computes the full 2N-bit unsigned product p = x * y. It is an N-row
// carry-save array: row j adds the partial products x_i & y_j, row 0 being
// plain AND gates and rows 1..N-1 made of cb_fa_cell adders. Cell (j,i) has
// weight 2^(i+j); it takes its partial sum from cell (j-1,i+1) and its carry
// from cell (j-1,i), so every cell in array column i shares multiplicand bit
// x_i. When x_i = 0 that whole column is bypassed (its adders are idle and
// sums pass straight through), which is where the power saving of the
// technique comes from: the more zero bits in the multiplicand, the fewer
// adders switch. Product bits 0..N-1 leave the array at its right edge; the
// last row's sums and carries are merged by an N-bit ripple-carry adder into
// bits N..2N-1.
//
// The bypass principle and the use of this multiplier as the main block
// follow the document; the array organisation, the ripple-carry final adder
// and leaving that adder without bypass are this design's choices.
// Purely combinational; its delay is the long path the ANT scheme lets fail
// under voltage overscaling.
module column_bypass_mult #(
  parameter int unsigned N = ant_pkg::ANT_N
) (
  input  logic [N-1:0]   x,   // multiplicand (controls the bypass)
  input  logic [N-1:0]   y,   // multiplier
  output logic [2*N-1:0] p
);
  // s_row[j][i], c_row[j][i]: sum and carry out of cell (j,i)
  logic [N-1:0] s_row [N];
  logic [N-1:0] c_row [N];

  assign s_row[0] = x & {N{y[0]}};
  assign c_row[0] = '0;

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic s_in;
      if (i == N - 1) begin : g_edge
        assign s_in = 1'b0;
      end else begin : g_inner
        assign s_in = s_row[j-1][i+1];
      end
      cb_fa_cell u_cell (
        .x_i  (x[i]),
        .y_j  (y[j]),
        .s_in (s_in),
        .c_in (c_row[j-1][i]),
        .s_out(s_row[j][i]),
        .c_out(c_row[j][i])
      );
    end
  end

  // Low half of the product: the rightmost sum of each row.
  logic [N-1:0] p_lo;
  always_comb begin
    for (int j = 0; j < N; j++) p_lo[j] = s_row[j][0];
  end

  // Vector-merging ripple-carry adder for the high half.
  logic [N-1:0] p_hi;
  logic         rc;
  always_comb begin
    logic a, b;
    rc = 1'b0;
    for (int k = 0; k < N; k++) begin
      a       = (k < N - 1) ? s_row[N-1][k+1] : 1'b0;
      b       = c_row[N-1][k];
      p_hi[k] = a ^ b ^ rc;
      rc      = (a & b) | (a & rc) | (b & rc);
    end
  end

  assign p = {p_hi, p_lo};
endmodule
