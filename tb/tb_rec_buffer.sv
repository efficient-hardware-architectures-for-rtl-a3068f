// tb_rec_buffer: writes and pops a delay line of depth 5 in an irregular
// pattern and checks that every read returns the word written DEPTH writes
// earlier; checks restart.
module tb_rec_buffer;
  localparam int D = 5, WD = 12;
  logic clk = 0, rst_n = 0, restart = 0, wr_en = 0, pop = 0;
  logic [WD-1:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rec_buffer #(.DEPTH(D), .WIDTH(WD)) dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [WD-1:0] hist [$];
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // prime: D writes
    for (int k = 0; k < D; k++) begin
      wr_en = 1; wr_data = WD'($urandom); hist.push_back(wr_data); @(posedge clk); #1;
    end
    wr_en = 0;
    for (int k = 0; k < 200; k++) begin
      // pop returns the oldest, then write a new one (possibly in the same cycle)
      checks++;
      if (rd_data !== hist[0]) begin failures++; $display("k=%0d got %h exp %h", k, rd_data, hist[0]); end
      pop = 1; wr_en = 1; wr_data = WD'($urandom);
      @(posedge clk); #1;
      void'(hist.pop_front()); hist.push_back(wr_data);
      pop = 0; wr_en = 0;
      if ($urandom_range(0, 1)) begin @(posedge clk); #1; end
    end
    restart = 1; @(posedge clk); #1 restart = 0;
    wr_en = 1; wr_data = 12'habc; @(posedge clk); #1 wr_en = 0;
    // after restart the read pointer is back at slot 0, which was just written
    checks++;
    if (rd_data !== 12'habc) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
