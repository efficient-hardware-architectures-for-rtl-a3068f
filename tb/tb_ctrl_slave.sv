// tb_ctrl_slave: AXI4-Lite writes/reads of the run registers, parameter
// writes to regions 1..4 (checks region, index and data of each prm_en
// pulse), the start pulse, and the busy/done status bits.
module tb_ctrl_slave;
  logic clk = 0, rst_n = 0;
  logic [31:0] s_awaddr = 0, s_wdata = 0, s_araddr = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic start, busy = 0, done_pulse = 0, prm_en;
  logic [31:0] src_addr, dst_addr, n_in, n_out, prm_idx, prm_data;
  logic [2:0] prm_region;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ctrl_slave dut (.*);
  `include "axil_host.svh"
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int nstart = 0, nprm = 0;
  logic [31:0] prm_log [$];
  always @(posedge clk) begin
    if (rst_n && start) nstart++;
    if (rst_n && prm_en) prm_log.push_back({1'b0, prm_region, prm_idx[11:0], prm_data[15:0]});
  end
  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask
  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    axil_write(32'h04, 32'h1000); axil_write(32'h08, 32'h2000);
    axil_write(32'h0C, 32'd77);   axil_write(32'h10, 32'd9);
    axil_read(32'h04, d); expect_eq(d, 32'h1000, "src");
    axil_read(32'h08, d); expect_eq(d, 32'h2000, "dst");
    axil_read(32'h0C, d); expect_eq(d, 32'd77, "n_in");
    axil_read(32'h10, d); expect_eq(d, 32'd9, "n_out");
    expect_eq(src_addr, 32'h1000, "src port"); expect_eq(n_out, 32'd9, "n_out port");
    for (int r = 1; r <= 4; r++)
      for (int k = 0; k < 5; k++) axil_write({4'(r), 26'(k * 37), 2'b00}, 32'(r * 1000 + k));
    @(posedge clk);
    expect_eq(prm_log.size(), 20, "prm count");
    for (int r = 1; r <= 4; r++)
      for (int k = 0; k < 5; k++) begin
        d = prm_log.pop_front();
        expect_eq(d, {1'b0, 3'(r), 12'(k * 37), 16'(r * 1000 + k)}, "prm");
      end
    expect_eq(nstart, 0, "no start yet");
    axil_write(32'h00, 32'h1);
    @(posedge clk);
    expect_eq(nstart, 1, "start");
    busy = 1;
    axil_read(32'h00, d); expect_eq(d, 32'h1, "busy");
    @(posedge clk); #1 busy = 0; done_pulse = 1; @(posedge clk); #1 done_pulse = 0;
    axil_read(32'h00, d); expect_eq(d, 32'h2, "done");
    axil_write(32'h00, 32'h1);
    axil_read(32'h00, d); expect_eq(d, 32'h0, "done cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
