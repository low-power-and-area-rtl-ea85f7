// Bypassable full-adder cell of the column-bypassing array multiplier.
//
// Each cell adds the partial product x_i & y_j to the partial sum and carry
// coming from the row above. All cells of one array column share the
// multiplicand bit x_i. When x_i is 0 the partial product is 0 and (because
// no carry can be generated anywhere in that column) so is c_in, so the cell
// has nothing to add: the adder inputs are gated to 0, which keeps the adder
// from toggling, and a multiplexer passes s_in straight to s_out with a zero
// carry. This is the full adder plus multiplexer structure of the column
// bypass technique; the input gating as the way of disabling the adder is
// this design's choice. Purely combinational.
module cb_fa_cell (
  input  logic x_i,    // multiplicand bit of this column, 0 = bypass
  input  logic y_j,    // multiplier bit of this row
  input  logic s_in,   // partial sum from the row above
  input  logic c_in,   // carry from the row above, same column
  output logic s_out,
  output logic c_out
);
  logic a, b, pp, fa_s, fa_c;

  // Operand isolation: a bypassed column sees constant inputs.
  always_comb begin
    a    = s_in & x_i;
    b    = c_in & x_i;
    pp   = x_i & y_j;
    fa_s = a ^ b ^ pp;
    fa_c = (a & b) | (a & pp) | (b & pp);
  end

  // Bypass multiplexer.
  always_comb begin
    s_out = x_i ? fa_s : s_in;
    c_out = x_i ? fa_c : 1'b0;
  end
endmodule
