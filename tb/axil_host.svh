// axil_host.svh: AXI4-Lite master tasks for the testbenches (included inside
// a module that declares clk and the s_* signals).
task automatic axil_write(input logic [31:0] a, input logic [31:0] d);
  @(posedge clk); #1;
  s_awaddr = a; s_awvalid = 1; s_wdata = d; s_wvalid = 1; s_bready = 1;
  do @(negedge clk); while (!(s_awready && s_wready));
  @(posedge clk); #1 s_awvalid = 0; s_wvalid = 0;
  while (!s_bvalid) begin @(negedge clk); end
  @(posedge clk); #1 s_bready = 0;
endtask
task automatic axil_read(input logic [31:0] a, output logic [31:0] d);
  @(posedge clk); #1;
  s_araddr = a; s_arvalid = 1; s_rready = 1;
  do @(negedge clk); while (!s_arready);
  @(posedge clk); #1 s_arvalid = 0;
  while (!s_rvalid) begin @(negedge clk); end
  d = s_rdata;
  @(posedge clk); #1 s_rready = 0;
endtask
