// tb_act_lut: checks every entry of the sigmoid and tanh tables against the
// functions evaluated in the testbench, and spot values (0 -> 0.5 / 0).
module tb_act_lut;
  import mdlstm_ref::*;
  logic signed [7:0] idx;
  logic [7:0] qs, qt;
  int checks = 0, failures = 0;
  act_lut #(.TANH(1'b0)) u_sig (.idx(idx), .q(qs));
  act_lut #(.TANH(1'b1)) u_tanh (.idx(idx), .q(qt));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = -128; i < 128; i++) begin
      idx = 8'(i);
      #1;
      checks += 2;
      if (int'(qs) != sig8(i)) begin failures++; $display("sigmoid(%0d)=%0d exp %0d", i, qs, sig8(i)); end
      if (int'($signed(qt)) != tanh8(i)) begin failures++; $display("tanh(%0d)=%0d exp %0d", i, $signed(qt), tanh8(i)); end
    end
    idx = 0; #1;
    checks += 2;
    if (qs != 8'd128) failures++;
    if (qt != 8'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
