// Self-checking testbench for cb_fa_cell: all 16 input combinations.
// With x_i = 1 the cell must add s_in + c_in + y_j; with x_i = 0 it must pass
// s_in through with a zero carry (column bypass).
module tb_cb_fa_cell;
  logic x_i, y_j, s_in, c_in, s_out, c_out;
  int checks = 0, failures = 0;

  cb_fa_cell dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int v = 0; v < 16; v++) begin
      {x_i, y_j, s_in, c_in} = 4'(v);
      #1;
      if (x_i) exp = 2'(s_in) + 2'(c_in) + 2'(y_j);
      else     exp = {1'b0, s_in};
      checks++;
      if ({c_out, s_out} !== exp) begin
        failures++;
        $display("FAIL x=%b y=%b s=%b c=%b -> c,s=%b%b exp %b", x_i, y_j, s_in, c_in, c_out, s_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
