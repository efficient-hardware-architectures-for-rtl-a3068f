// tb_pim_pwl_act: sweeps the 16-bit input (1 fraction bit) from -20 to +20
// and checks both functions against a real-valued PLAN/2-bit reference,
// monotonicity, and against the exact sigmoid/tanh within one output step.
module tb_pim_pwl_act;
  import pim_ref::*;
  logic signed [15:0] x;
  logic tanh_sel;
  logic [1:0] q;
  int checks = 0, failures = 0;
  pim_pwl_act #(.IN_W(16), .FRAC_IN(1)) dut (.*);
  initial begin
    #1000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int prev_s, prev_t, e;
    real xr, ex;
    prev_s = 0; prev_t = -2;
    for (int v = -40; v <= 40; v++) begin
      x = 16'(v); xr = real'(v) / 2.0;
      tanh_sel = 0; #1;
      e = sig_q(xr);
      ex = 4.0 / (1.0 + $exp(-xr));
      checks += 3;
      if (int'(q) != e) begin failures++; $display("sig x=%f q=%0d exp %0d", xr, q, e); end
      if (int'(q) < prev_s) failures++;
      if (real'(q) - ex > 1.0 || ex - real'(q) > 1.0) failures++;
      prev_s = int'(q);
      tanh_sel = 1; #1;
      e = tanh_q(xr);
      ex = 2.0 * (($exp(xr) - $exp(-xr)) / ($exp(xr) + $exp(-xr)));
      checks += 3;
      if (int'($signed(q)) != e) begin failures++; $display("tanh x=%f q=%0d exp %0d", xr, $signed(q), e); end
      if (int'($signed(q)) < prev_t) failures++;
      if (real'($signed(q)) - ex > 1.0 || ex - real'($signed(q)) > 1.0) failures++;
      prev_t = int'($signed(q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
