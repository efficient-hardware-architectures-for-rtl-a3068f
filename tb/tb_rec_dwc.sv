// tb_rec_dwc: feeds groups of PE=2 values (NH=6, 3 groups per word) with
// gaps and checks that the word write happens exactly on the last group and
// holds all y and c values in place.
module tb_rec_dwc;
  localparam int NH = 6, PE = 2, YW = 4, CW = 16;
  logic clk = 0, in_fire = 0, in_last = 0, wr_en;
  logic [15:0] in_grp = 0;
  logic [PE*YW-1:0] in_y = 0;
  logic [PE*CW-1:0] in_c = 0;
  logic [NH*(YW+CW)-1:0] wr_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rec_dwc #(.NH(NH), .PE(PE), .YW(YW), .CW(CW)) dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [YW-1:0] ye [NH];
  logic [CW-1:0] ce [NH];
  initial begin
    repeat (2) @(posedge clk); #1;
    for (int w = 0; w < 20; w++) begin
      for (int n = 0; n < NH; n++) begin ye[n] = YW'($urandom); ce[n] = CW'($urandom); end
      for (int g = 0; g < NH / PE; g++) begin
        in_fire = 1; in_grp = 16'(g); in_last = (g == NH / PE - 1);
        for (int p = 0; p < PE; p++) begin in_y[p*YW +: YW] = ye[g*PE+p]; in_c[p*CW +: CW] = ce[g*PE+p]; end
        #1;
        checks++;
        if (wr_en != in_last) failures++;
        if (in_last) begin
          for (int n = 0; n < NH; n++) begin
            checks++;
            if (wr_data[n*YW +: YW] !== ye[n] || wr_data[NH*YW + n*CW +: CW] !== ce[n]) begin
              failures++; $display("word %0d cell %0d wrong", w, n);
            end
          end
        end
        @(posedge clk); #1;
        in_fire = 0;
        if ($urandom_range(0, 1)) begin @(posedge clk); #1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
