// Error-compensation vector of the fixed-width reduced-precision replica.
//
// The replica keeps only the partial products of weight 2^(3N/2) and up of
// xh*yh*2^N (xh, yh: upper halves of the operands). The discarded part, and
// the whole low part of the exact product, is made up for by injecting
// N/2 compensation bits at weight 2^(3N/2):
//   C1..C(N/2-1)  the input correction vector ICV: the partial products of
//                 the highest discarded column (weight 2^(3N/2-1)),
//                 X(N-k)&Y(N/2+k-1) for k = 1..N/2-1. Their count beta is the
//                 main compensation value.
//   C(N/2)        X(N/2)&Y(N-1) (the last term of that column) ORed with Cm.
//   Cm            Cm1 & Cm2, where Cm1 = NOR of the ICV terms (beta = 0) and
//                 Cm2 = OR of the minor input correction vector MICV, the
//                 column below: X(N-1-k)&Y(N/2+k-1), k = 1..N/2-1
//                 (beta_l > 0). It adds one more unit when beta is 0 but
//                 the next column is not empty.
// The gate structure (NOR, OR, AND, OR) and the choice of the two columns
// follow the published design; taking each vector as a whole column of the
// array is how this module reads its term lists. Purely combinational; the inputs are
// indexed from 0, so operand bit X(N/2+m) is xh[m].
module rpr_comp_vector #(
  parameter int unsigned N = ant_pkg::ANT_N
) (
  input  logic [N/2-1:0] xh,
  input  logic [N/2-1:0] yh,
  output logic [N/2-1:0] c,    // c[k-1] is C_k, each of weight 2^(3N/2)
  output logic           cm
);
  localparam int unsigned H = N / 2;

  logic [H-2:0] icv, micv;
  logic         cm1, cm2;

  always_comb begin
    for (int k = 1; k <= H - 1; k++) begin
      icv[k-1]  = xh[H-k]   & yh[k-1];   // X(N-k)   Y(N/2+k-1)
      micv[k-1] = xh[H-1-k] & yh[k-1];   // X(N-1-k) Y(N/2+k-1)
    end
    cm1 = ~(|icv);
    cm2 = |micv;
    cm  = cm1 & cm2;
    c   = {(xh[0] & yh[H-1]) | cm, icv};
  end
endmodule
