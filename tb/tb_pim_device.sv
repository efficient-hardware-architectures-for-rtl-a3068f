// tb_pim_device: two PIM banks of two cells each (4 rows per sub-array).
// Loads weights and inputs into both banks, runs LSTM steps in both at once
// (step mask) and checks y(t) of every cell read over the shared bus; then
// broadcasts bank 0's y(t) into an input column of bank 1 (YOUT and WRB in
// one cycle), runs bank 1 alone, and checks again; also checks that a
// command to one bank leaves the other alone.  Counts the broadcasts and
// steps.
module tb_pim_device;
  import pim_pkg::*;
  localparam int NB = 2, NC = 2, NE = 160;
  logic clk = 0, rst_n = 0;
  pim_req_t pim_req = '0, pim_bcast_req = '0;
  logic pim_req_valid = 0, pim_bcast = 0, pim_step_start = 0;
  logic [0:0] pim_bank = 0, pim_bcast_src = 0;
  logic [1:0] pim_bcast_byte = 0;
  logic [NB-1:0] pim_bcast_mask = 0, pim_step_mask = 0, pim_step_busy, pim_step_done;
  logic [63:0] pim_wdata = 0, pim_rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pim_device #(.N_BANKS(NB), .N_CSA(NC), .ROWS(4)) dut (
    .clk, .rst_n, .req(pim_req), .req_valid(pim_req_valid), .bank(pim_bank), .wdata(pim_wdata),
    .rdata(pim_rdata), .bcast(pim_bcast), .bcast_src(pim_bcast_src), .bcast_byte(pim_bcast_byte),
    .bcast_mask(pim_bcast_mask), .bcast_req(pim_bcast_req), .step_mask(pim_step_mask),
    .step_start(pim_step_start), .step_busy(pim_step_busy), .step_done(pim_step_done));
  `include "pim_host.svh"
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int bad;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    pim_load_weights(0);
    pim_load_weights(1);
    for (int t = 0; t < 2; t++) begin
      pim_load_inputs(0);
      pim_load_inputs(1);
      pim_step(2'b11);
      for (int b = 0; b < NB; b++) begin
        pim_ref_step(b);
        pim_check_y(b, bad);
        checks++;
        if (bad != 0) failures++;
      end
    end
    // bank 0's y(t) becomes part of bank 1's input
    pim_load_inputs(1);
    pim_broadcast(0, 2'b10, 39);
    // the broadcast byte is in bank 1's data row
    @(posedge clk); #1;
    pim_req = '0; pim_req.cmd = PIM_RD; pim_req.blk = 2'd0; pim_req.col = 7'd39; pim_bank = 1'b1; pim_req_valid = 1; #1;
    for (int k = 0; k < NC; k++) begin
      logic [7:0] e;
      e = '0;
      for (int j = 0; j < NC; j++) e[2*j +: 2] = 2'(yv[0][j]);
      checks++;
      if (pim_rdata[k*8 +: 8] !== e) begin failures++; $display("broadcast byte in CSA %0d: %h exp %h", k, pim_rdata[k*8 +: 8], e); end
    end
    @(posedge clk); #1 pim_req_valid = 0; pim_req = '0;
    pim_step(2'b10);
    pim_ref_step(1);
    pim_check_y(1, bad);
    checks++;
    if (bad != 0) failures++;
    // bank 0 untouched by the bank-1 step
    pim_check_y(0, bad);
    checks++;
    if (bad != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
