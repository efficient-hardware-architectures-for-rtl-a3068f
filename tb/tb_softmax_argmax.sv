// tb_softmax_argmax: random signed output vectors (NO=10) with ties and a
// randomly stalling consumer; checks the label (largest value, lowest index
// on ties) and the pass-through of the last flag, in order.
module tb_softmax_argmax;
  localparam int NO = 10, ZW = 12, LW = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, out_ready = 0;
  logic in_ready, out_valid, out_last;
  logic [NO*ZW-1:0] in_z = 0;
  logic [LW-1:0] out_label;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  softmax_argmax #(.NO(NO), .ZW(ZW)) dut (.*);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int exp_q [$];
  always @(posedge clk) out_ready <= $urandom_range(0, 2) != 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (int'(out_label) != (e & 15) || out_last != e[4]) begin failures++; $display("got %0d exp %0d", out_label, e); end
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int best, bv, v;
      best = 0; bv = -100000;
      for (int o = 0; o < NO; o++) begin
        v = $urandom_range(0, 40) - 20;
        in_z[o*ZW +: ZW] = ZW'(v);
        if (v > bv) begin bv = v; best = o; end
      end
      in_last = $urandom_range(0, 1);
      in_valid = 1;
      exp_q.push_back(best | (int'(in_last) << 4));
      do @(negedge clk); while (!in_ready);
      @(posedge clk); #1 in_valid = 0;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
