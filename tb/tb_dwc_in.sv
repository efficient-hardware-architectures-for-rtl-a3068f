// tb_dwc_in: sends 64-bit words of eight 8-bit elements and checks that the
// element sequence leaves in groups of three (groups straddle words) in
// order, under random back-pressure on both sides; checks the count.
module tb_dwc_in;
  localparam int BUS_W = 64, EW = 8, N = 3;
  logic clk = 0, rst_n = 0, restart = 0, in_valid = 0, out_ready = 0;
  logic in_ready, out_valid;
  logic [BUS_W-1:0] in_data = 0;
  logic [N*EW-1:0] out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  dwc_in #(.BUS_W(BUS_W), .ELEM_W(EW), .OUT_N(N)) dut (.*);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int nout = 0;
  always @(posedge clk) out_ready <= $urandom_range(0, 2) != 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    for (int i = 0; i < N; i++) begin
      checks++;
      if (out_data[i*EW +: EW] != EW'(nout * N + i)) begin failures++; $display("elem %0d got %0d", nout*N+i, out_data[i*EW +: EW]); end
    end
    nout++;
  end
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int w = 0; w < 30; w++) begin
      for (int e = 0; e < BUS_W / EW; e++) in_data[e*EW +: EW] = EW'(w * (BUS_W / EW) + e);
      in_valid = 1;
      do @(negedge clk); while (!in_ready);
      @(posedge clk); #1 in_valid = 0;
      if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
    end
    repeat (50) @(posedge clk);
    checks++;
    if (nout != 30 * 8 / 3) begin failures++; $display("groups %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
