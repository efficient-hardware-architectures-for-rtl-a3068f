// tb_pim_bank: one PIM bank (16 CSAs = 16 LSTM cells, 4 sub-array blocks
// = gates a, i, f, o, 160 inputs per gate, 4 rows per sub-array).  The host
// writes random binary weights with column writes (8 CSAs per command),
// the input vector into all blocks and CSAs at once with the multi-CSL
// write, the biases, and clears c; then it starts three LSTM time steps with
// new inputs and checks y(t) of all 16 cells against the reference after
// each.  Also checks RD of weight bytes and the YOUT read.
module tb_pim_bank;
  import pim_pkg::*;
  import pim_ref::*;
  localparam int NC = 16, NU = 5, NE = NU * 32;
  logic clk = 0, rst_n = 0, req_valid = 0, step_start = 0, step_busy, step_done;
  pim_req_t req;
  logic [63:0] wdata = 0, rdata;
  logic [2*NC-1:0] y_vec;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pim_bank #(.N_CSA(NC), .MAC_ROWS(4), .ROWS(4), .COLS(1024), .NU(NU)) dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  bit wt [NC][4][NE];
  int bias [NC][4];
  int xd [NE];
  int cst [NC];

  task automatic issue(input pim_cmd_e c, input int blk, input int row, input int col, input int half,
                       input int sel, input logic [63:0] d);
    @(posedge clk); #1;
    req = '0; req.cmd = c; req.blk = 2'(blk); req.row = 10'(row); req.col = 7'(col); req.half = 1'(half);
    req.sel = 4'(sel); req.wr_mask = 4'hF; wdata = d; req_valid = 1;
    @(posedge clk); #1 req_valid = 0; req = '0;
  endtask

  task automatic load_inputs();
    for (int e = 0; e < NE; e++) xd[e] = $urandom_range(0, 3) - 2;
    for (int g = 0; g < 4; g++) issue(PIM_ACT, g, 1, 0, 0, 0, 0);
    for (int c = 0; c < NE / 4; c++) begin
      logic [7:0] b;
      for (int j = 0; j < 4; j++) b[2*j +: 2] = 2'(xd[4*c+j]);
      issue(PIM_WRB, 0, 0, c, 0, 0, {56'd0, b});
    end
  endtask

  task automatic step_and_check(input int t);
    int q [4], s, yr;
    @(posedge clk); #1 step_start = 1; @(posedge clk); #1 step_start = 0;
    while (!step_done) @(posedge clk);
    #1;
    for (int k = 0; k < NC; k++) begin
      for (int g = 0; g < 4; g++) begin
        s = bias[k][g];
        for (int e = 0; e < NE; e++) s += wt[k][g][e] ? -xd[e] : xd[e];
        q[g] = (g == 0) ? tanh_q(real'(s) / 2.0) : sig_q(real'(s) / 2.0);
      end
      cell_step(q[0], q[1], q[2], q[3], cst[k], yr);
      checks++;
      if (int'($signed(y_vec[2*k +: 2])) != yr) begin failures++; $display("t=%0d cell %0d y %0d exp %0d", t, k, $signed(y_vec[2*k +: 2]), yr); end
    end
  endtask

  initial begin
    req = '0;
    for (int k = 0; k < NC; k++) begin
      cst[k] = 0;
      for (int g = 0; g < 4; g++) begin
        bias[k][g] = $urandom_range(0, 30) - 15;
        for (int e = 0; e < NE; e++) wt[k][g][e] = 1'($urandom);
      end
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // weights: row 0 of every block, column writes to 8 CSAs at a time
    for (int g = 0; g < 4; g++) begin
      issue(PIM_ACT, g, 0, 0, 0, 0, 0);
      for (int c = 0; c < NE / 4; c++)
        for (int h = 0; h < 2; h++) begin
          logic [63:0] d;
          for (int j = 0; j < 8; j++)
            for (int i = 0; i < 4; i++) d[j*8 + 2*i +: 2] = {2{wt[h*8+j][g][4*c+i]}};
          issue(PIM_WR, g, 0, c, h, 0, d);
        end
    end
    // read back one column word of block 2, upper half
    @(posedge clk); #1;
    req = '0; req.cmd = PIM_ACT; req.blk = 2; req.row = 0; req_valid = 1;
    @(posedge clk); #1 req.cmd = PIM_RD; req.col = 7'd3; req.half = 1'b1;
    #1;
    for (int j = 0; j < 8; j++) begin
      checks++;
      for (int i = 0; i < 4; i++)
        if (rdata[j*8 + 2*i +: 2] !== {2{wt[8+j][2][12+i]}}) begin failures++; $display("RD byte %0d", j); break; end
    end
    @(posedge clk); #1 req_valid = 0; req = '0;
    for (int k = 0; k < NC; k++)
      for (int g = 0; g < 4; g++) issue(PIM_BIAS, 0, 0, k, 0, g, 64'(16'(bias[k][g])));
    issue(PIM_CLR, 0, 0, 0, 0, 0, 0);
    for (int t = 0; t < 3; t++) begin
      load_inputs();
      step_and_check(t);
    end
    // YOUT puts y(t) on the bus
    @(posedge clk); #1 req = '0; req.cmd = PIM_YOUT; req_valid = 1; #1;
    checks++;
    if (rdata[2*NC-1:0] !== y_vec) failures++;
    @(posedge clk); #1 req_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
