// tb_dwc_out: packs 4-bit labels into 64-bit words (16 per word), with a
// last flag after 37 labels forcing a partly filled, zero-padded word;
// random back-pressure; checks every word.
module tb_dwc_out;
  localparam int BUS_W = 64, LW = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, out_ready = 0;
  logic in_ready, out_valid;
  logic [LW-1:0] in_label = 0;
  logic [BUS_W-1:0] out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  dwc_out #(.BUS_W(BUS_W), .LBL_W(LW)) dut (.*);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [BUS_W-1:0] exp_q [$];
  always @(posedge clk) out_ready <= $urandom_range(0, 2) != 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [BUS_W-1:0] e;
    e = exp_q.pop_front();
    checks++;
    if (out_data !== e) begin failures++; $display("got %h exp %h", out_data, e); end
  end
  initial begin
    logic [BUS_W-1:0] acc;
    int k;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    acc = 0; k = 0;
    for (int n = 0; n < 100; n++) begin
      in_label = LW'($urandom);
      in_last = (n == 36) || (n == 99);
      acc[k*LW +: LW] = in_label;
      k++;
      if (k == 16 || in_last) begin exp_q.push_back(acc); acc = 0; k = 0; end
      in_valid = 1;
      do @(negedge clk); while (!in_ready);
      @(posedge clk); #1 in_valid = 0;
    end
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
