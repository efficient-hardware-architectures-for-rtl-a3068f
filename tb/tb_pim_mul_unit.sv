// tb_pim_mul_unit: exhaustive check of the binary-weight multiplier: for
// both weights (0 = +1, 1 = -1, duplicated onto two latches) and all four
// 2-bit signed data values the 3-bit product must equal d * w.
module tb_pim_mul_unit;
  logic [1:0] w_dup, d;
  logic signed [2:0] p;
  int checks = 0, failures = 0;
  pim_mul_unit dut (.*);
  initial begin
    #1000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int w = 0; w < 2; w++)
      for (int dv = -2; dv < 2; dv++) begin
        w_dup = {2{1'(w)}}; d = 2'(dv);
        #1;
        checks++;
        if (int'(p) != (w ? -dv : dv)) begin failures++; $display("w=%0d d=%0d p=%0d", w, dv, p); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
