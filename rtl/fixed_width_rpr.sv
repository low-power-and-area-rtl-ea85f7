// Fixed-width reduced-precision replica (RPR) of the NxN multiplier.
//
// The replica is fed only the upper operand halves xh = x[N-1:N/2] and
// yh = y[N-1:N/2]. Of the (N/2)x(N/2) array of xh*yh it builds only the
// cells of weight 2^(3N/2) and above, i.e. partial products xh[i]&yh[j] with
// i+j >= N/2 (H = N/2 below). Its H-bit result yr therefore stands for
// yr * 2^(3N/2). It is about a quarter of the main array and has a much
// shorter carry chain, so it stays correct when the main block is
// voltage-overscaled.
//
// Structure: a truncated carry-save array. Row j, cell i (i+j >= H) adds
// xh[i]&yh[j] to the sum of cell (j-1,i+1) and the carry of cell (j-1,i),
// like the main array. The lowest kept cell of each row, (j, H-j), would take
// its carry from the dropped column of weight H-1; instead it receives one
// compensation bit C_j (j = 1..H-1) from rpr_comp_vector, which are exactly
// that dropped column's partial products. The ripple-carry adder that merges
// the last row receives the remaining bit C_H, which carries the conditional
// unit Cm, as its carry-in, at the bottom of the array and away from the
// critical path. Net effect: yr = (sum of kept partial products) + C_1 + ...
// + C_H, in units of 2^(3N/2).
//
// The compensation scheme and the injection of C_H at the bottom follow the
// published design; the array organisation is this design's own. For every
// even N from 8 to 16 the sum never exceeds 2^H - 1, so the final carry-out
// is always 0 and is dropped. Outputs: yr, and cm showing that the conditional unit was
// injected. Purely combinational.
module fixed_width_rpr #(
  parameter int unsigned N = ant_pkg::ANT_N
) (
  input  logic [N/2-1:0] xh,   // x[N-1:N/2]
  input  logic [N/2-1:0] yh,   // y[N-1:N/2]
  output logic [N/2-1:0] yr,   // LSB weight 2^(3N/2)
  output logic           cm
);
  localparam int unsigned H = N / 2;

  logic [H-1:0] comp;   // comp[k-1] is C_k

  rpr_comp_vector #(.N(N)) u_comp (
    .xh(xh),
    .yh(yh),
    .c (comp),
    .cm(cm)
  );

  // s_row[j][i], c_row[j][i]: sum and carry of cell (j,i); cells with
  // i+j < H do not exist and their entries are tied to 0.
  logic [H-1:0] s_row [H];
  logic [H-1:0] c_row [H];

  // Row 0 has no cell of weight >= H.
  assign s_row[0] = '0;
  assign c_row[0] = '0;

  for (genvar j = 1; j < H; j++) begin : g_row
    for (genvar i = 0; i < H; i++) begin : g_col
      if (i + j < H) begin : g_cut
        assign s_row[j][i] = 1'b0;
        assign c_row[j][i] = 1'b0;
      end else begin : g_cell
        logic a, b, pp;
        assign pp = xh[i] & yh[j];
        if (i == H - 1) begin : g_edge
          assign a = 1'b0;
        end else begin : g_inner
          assign a = s_row[j-1][i+1];
        end
        if (i + j == H) begin : g_inject
          assign b = comp[j-1];          // C_j replaces the dropped carry
        end else begin : g_carry
          assign b = c_row[j-1][i];
        end
        assign s_row[j][i] = a ^ b ^ pp;
        assign c_row[j][i] = (a & b) | (a & pp) | (b & pp);
      end
    end
  end

  // Vector-merging adder over the kept columns, carry-in C_H.
  // Bit k has weight 2^(H+k) within xh*yh: sum of cell (H-1,k+1) and carry
  // of cell (H-1,k).
  always_comb begin
    logic a, b, rc;
    rc = comp[H-1];
    for (int k = 0; k < H; k++) begin
      a     = (k < H - 1) ? s_row[H-1][k+1] : 1'b0;
      b     = c_row[H-1][k];
      yr[k] = a ^ b ^ rc;
      rc    = (a & b) | (a & rc) | (b & rc);
    end
  end
endmodule
