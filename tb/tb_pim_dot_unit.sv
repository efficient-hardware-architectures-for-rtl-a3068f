// tb_pim_dot_unit: 2000 random and 4 extreme vectors of 32 binary weights and
// 2-bit data; the adder-tree result must equal the dot product.
module tb_pim_dot_unit;
  localparam int N = 32;
  logic [2*N-1:0] w, d;
  logic signed [7:0] dot;
  int checks = 0, failures = 0;
  pim_dot_unit #(.N(N)) dut (.*);
  initial begin
    #1000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check();
    int e;
    #1;
    e = 0;
    for (int j = 0; j < N; j++) e += (w[2*j] ? -1 : 1) * int'($signed(d[2*j +: 2]));
    checks++;
    if (int'(dot) != e) begin failures++; $display("dot %0d exp %0d", dot, e); end
  endtask
  initial begin
    for (int k = 0; k < 2000; k++) begin
      for (int j = 0; j < N; j++) begin
        w[2*j +: 2] = {2{1'($urandom)}};
        d[2*j +: 2] = 2'($urandom);
      end
      check();
    end
    w = '0; d = {N{2'b10}}; check();   // -64
    w = '1; d = {N{2'b10}}; check();   // +64
    w = '0; d = {N{2'b01}}; check();
    w = '1; d = {N{2'b01}}; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
