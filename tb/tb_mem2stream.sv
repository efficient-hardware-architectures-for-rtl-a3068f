// tb_mem2stream: reads several regions (lengths 1, 16, 37, 300, one starting
// just below a 4 KiB boundary) from the AXI memory model with random read
// gaps and random stream back-pressure; checks every word in order, that no
// burst crosses 4 KiB or exceeds 16 beats, and the done pulse.
module tb_mem2stream;
  localparam int BUS_W = 64;
  logic clk = 0, rst_n = 0, start = 0, out_ready = 0;
  logic [31:0] addr = 0, nwords = 0;
  logic done, busy, out_valid;
  logic [BUS_W-1:0] out_data;
  logic [31:0] m_araddr; logic [7:0] m_arlen; logic [2:0] m_arsize; logic [1:0] m_arburst;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [BUS_W-1:0] m_rdata;
  logic [31:0] awaddr = 0; logic [7:0] awlen = 0; logic awready, wready, bvalid; logic [1:0] bresp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mem2stream #(.BUS_W(BUS_W)) dut (.*);
  axi_mem_model #(.BUS_W(BUS_W), .DEPTH(2048)) mem (
    .clk, .rst_n, .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr, .awlen, .awvalid(1'b0), .awready, .wdata('0), .wlast(1'b0), .wvalid(1'b0), .wready,
    .bresp, .bvalid, .bready(1'b1)
  );
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) out_ready <= $urandom_range(0, 3) != 0;
  always @(posedge clk) if (rst_n && m_arvalid && m_arready) begin
    checks++;
    if (m_arlen > 15 || m_arburst != 2'b01 || m_arsize != 3'd3) failures++;
  end
  int exp_w, ndone;
  always @(posedge clk) if (rst_n && done) ndone++;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_data !== {32'hA5A5_0000, 32'(exp_w)}) begin failures++; $display("got %h exp idx %0d", out_data, exp_w); end
    exp_w++;
  end
  task automatic run(input int a, input int n);
    addr = a; nwords = n; exp_w = a / 8;
    start = 1; @(posedge clk); #1 start = 0;
    wait (ndone > 0); @(posedge clk); #1;
    checks++;
    if (exp_w != a / 8 + n) begin failures++; $display("count %0d", exp_w - a / 8); end
    ndone = 0;
  endtask
  initial begin
    for (int i = 0; i < 2048; i++) mem.mem[i] = {32'hA5A5_0000, 32'(i)};
    ndone = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run(0, 1);
    run(64, 16);
    run(8 * 100, 37);
    run(4096 - 8 * 5, 300);
    checks++;
    if (mem.violations != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
