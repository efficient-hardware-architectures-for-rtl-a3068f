// tb_stream2mem: streams 50 words with gaps into the AXI memory model (random
// awready/wready) and checks the memory contents, the response handling and
// the done pulse after the last response.
module tb_stream2mem;
  localparam int BUS_W = 64;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic [31:0] addr = 0, nwords = 0;
  logic done, busy, in_ready;
  logic [BUS_W-1:0] in_data = 0;
  logic [31:0] m_awaddr; logic [7:0] m_awlen; logic [2:0] m_awsize; logic [1:0] m_awburst;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [BUS_W-1:0] m_wdata; logic [BUS_W/8-1:0] m_wstrb; logic [1:0] m_bresp;
  logic arready, rlast, rvalid; logic [BUS_W-1:0] rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  stream2mem #(.BUS_W(BUS_W)) dut (.*);
  axi_mem_model #(.BUS_W(BUS_W), .DEPTH(1024)) mem (
    .clk, .rst_n, .araddr('0), .arlen('0), .arvalid(1'b0), .arready, .rdata, .rlast, .rvalid, .rready(1'b0),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready)
  );
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int ndone = 0;
  always @(posedge clk) if (done) ndone++;
  initial begin
    for (int i = 0; i < 1024; i++) mem.mem[i] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    addr = 32'h200; nwords = 50;
    start = 1; @(posedge clk); #1 start = 0;
    for (int k = 0; k < 50; k++) begin
      in_data = {32'hBEEF_0000, 32'(k)}; in_valid = 1;
      do @(negedge clk); while (!in_ready);
      @(posedge clk); #1 in_valid = 0;
      if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
    end
    wait (ndone > 0);
    repeat (3) @(posedge clk);
    for (int k = 0; k < 50; k++) begin
      checks++;
      if (mem.mem[32'h200 / 8 + k] !== {32'hBEEF_0000, 32'(k)}) begin failures++; $display("word %0d", k); end
    end
    checks++;
    if (mem.mem[32'h200 / 8 + 50] !== '0 || mem.mem[32'h200 / 8 - 1] !== '0 || ndone != 1 || busy) failures++;
    checks++;
    if (m_wstrb !== '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
