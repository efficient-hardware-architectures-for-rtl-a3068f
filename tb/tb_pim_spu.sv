// tb_pim_spu: drives the secondary processing unit as the transfer register
// does: per time step, five partial dot products per gate into entries 0..3
// (a, i, f, o; last one flagged done), then CELL; also FC partial sums into
// entry 5.  Checks y(t) and the FC sums against the reference over 40 time
// steps, with a c clear every 10 steps.
module tb_pim_spu;
  import pim_ref::*;
  logic clk = 0, rst_n = 0, in_valid = 0, done = 0, bias_we = 0, cell_go = 0, c_clr = 0;
  logic signed [7:0] in_dot = 0;
  logic [3:0] sel = 0, bias_sel = 0;
  logic [15:0] bias_data = 0, fc_sum;
  logic [1:0] y;
  logic y_valid, fc_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pim_spu dut (.*);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int bias [4];
  initial begin
    int c, yr, q [4], s, fcs;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int g = 0; g < 4; g++) begin
      bias[g] = $urandom_range(0, 40) - 20;
      @(posedge clk); #1 bias_we = 1; bias_sel = 4'(g); bias_data = 16'(bias[g]);
    end
    @(posedge clk); #1 bias_we = 0;
    c = 0;
    for (int t = 0; t < 40; t++) begin
      if (t % 10 == 0) begin
        @(posedge clk); #1 c_clr = 1; @(posedge clk); #1 c_clr = 0;
        c = 0;
      end
      for (int g = 0; g < 4; g++) begin
        s = 0;
        for (int u = 0; u < 5; u++) begin
          int v;
          v = $urandom_range(0, 40) - 20;
          s += v;
          @(posedge clk); #1 in_valid = 1; sel = 4'(g); in_dot = 8'(v); done = (u == 4);
        end
        s += bias[g];
        q[g] = (g == 0) ? tanh_q(real'(s) / 2.0) : sig_q(real'(s) / 2.0);
      end
      fcs = 0;
      for (int u = 0; u < 3; u++) begin
        int v;
        v = $urandom_range(0, 120) - 60;
        fcs += v;
        @(posedge clk); #1 in_valid = 1; sel = 4'd5; in_dot = 8'(v); done = (u == 2);
      end
      @(posedge clk); #1 in_valid = 0; done = 0;
      checks++;
      if (!fc_valid || int'($signed(fc_sum)) != fcs) begin failures++; $display("fc %0d exp %0d", $signed(fc_sum), fcs); end
      cell_go = 1; @(posedge clk); #1 cell_go = 0;
      cell_step(q[0], q[1], q[2], q[3], c, yr);
      checks++;
      if (!y_valid || int'($signed(y)) != yr) begin failures++; $display("t=%0d y %0d exp %0d", t, $signed(y), yr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
