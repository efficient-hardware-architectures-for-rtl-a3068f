// pim_host.svh: host-side tasks for the PIM device testbenches (included in
// a module that declares clk, NB (banks), NC (cells per bank), NE (inputs
// per gate) and the pim_* bus signals).  Keeps the reference state: binary
// weights, biases, the current input vector of each bank and the cell states.
import pim_ref::*;
bit wt   [NB][NC][4][NE];
int bias [NB][NC][4];
int xd   [NB][NE];
int cst  [NB][NC];
int yv   [NB][NC];

task automatic pim_issue(input int b, input pim_cmd_e c, input int blk, input int row, input int col,
                         input int half, input int sel, input logic [63:0] d);
  @(posedge clk); #1;
  pim_req = '0; pim_req.cmd = c; pim_req.blk = 2'(blk); pim_req.row = 10'(row); pim_req.col = 7'(col);
  pim_req.half = 1'(half); pim_req.sel = 4'(sel); pim_req.wr_mask = 4'hF;
  pim_bank = $bits(pim_bank)'(b); pim_wdata = d; pim_req_valid = 1;
  @(posedge clk); #1 pim_req_valid = 0; pim_req = '0;
endtask

// random weights and biases, written to rows 0, then c cleared
task automatic pim_load_weights(input int b);
  for (int k = 0; k < NC; k++) begin
    cst[b][k] = 0;
    for (int g = 0; g < 4; g++) begin
      bias[b][k][g] = $urandom_range(0, 30) - 15;
      for (int e = 0; e < NE; e++) wt[b][k][g][e] = 1'($urandom);
    end
  end
  for (int g = 0; g < 4; g++) begin
    pim_issue(b, PIM_ACT, g, 0, 0, 0, 0, 0);
    for (int c = 0; c < NE / 4; c++)
      for (int h = 0; h < (NC + 7) / 8; h++) begin
        logic [63:0] d;
        d = '0;
        for (int j = 0; j < 8 && h * 8 + j < NC; j++)
          for (int i = 0; i < 4; i++) d[j*8 + 2*i +: 2] = {2{wt[b][h*8+j][g][4*c+i]}};
        pim_issue(b, PIM_WR, g, 0, c, h, 0, d);
      end
  end
  for (int k = 0; k < NC; k++)
    for (int g = 0; g < 4; g++) pim_issue(b, PIM_BIAS, 0, 0, k, 0, g, 64'(16'(bias[b][k][g])));
  pim_issue(b, PIM_CLR, 0, 0, 0, 0, 0, 0);
endtask

// random input vector into row 1 of every block (multi-CSL write)
task automatic pim_load_inputs(input int b);
  for (int e = 0; e < NE; e++) xd[b][e] = $urandom_range(0, 3) - 2;
  for (int g = 0; g < 4; g++) pim_issue(b, PIM_ACT, g, 1, 0, 0, 0, 0);
  for (int c = 0; c < NE / 4; c++) begin
    logic [7:0] v;
    for (int j = 0; j < 4; j++) v[2*j +: 2] = 2'(xd[b][4*c+j]);
    pim_issue(b, PIM_WRB, 0, 0, c, 0, 0, {56'd0, v});
  end
endtask

// reference step of bank b
task automatic pim_ref_step(input int b);
  for (int k = 0; k < NC; k++) begin
    int q [4], s;
    for (int g = 0; g < 4; g++) begin
      s = bias[b][k][g];
      for (int e = 0; e < NE; e++) s += wt[b][k][g][e] ? -xd[b][e] : xd[b][e];
      q[g] = (g == 0) ? tanh_q(real'(s) / 2.0) : sig_q(real'(s) / 2.0);
    end
    cell_step(q[0], q[1], q[2], q[3], cst[b][k], yv[b][k]);
  end
endtask

// y(t) of bank b read over the bus; returns the number of wrong cells
task automatic pim_check_y(input int b, output int bad);
  @(posedge clk); #1;
  pim_req = '0; pim_req.cmd = PIM_YOUT; pim_bank = $bits(pim_bank)'(b); pim_req_valid = 1; #1;
  bad = 0;
  for (int k = 0; k < NC; k++)
    if (int'($signed(pim_rdata[2*k +: 2])) != yv[b][k]) begin
      bad++; $display("bank %0d cell %0d y %0d exp %0d", b, k, $signed(pim_rdata[2*k +: 2]), yv[b][k]);
    end
  @(posedge clk); #1 pim_req_valid = 0; pim_req = '0;
endtask

// broadcast byte 0 of bank src's y(t) into column word col of the open rows
// of the banks in mask; the reference inputs of those banks follow
task automatic pim_broadcast(input int src, input logic [NB-1:0] mask, input int col);
  @(posedge clk); #1;
  pim_wdata = '1;   // the receivers must take the bus, not the host data
  pim_bcast = 1; pim_bcast_src = $bits(pim_bcast_src)'(src); pim_bcast_byte = 2'd0; pim_bcast_mask = mask;
  pim_bcast_req = '0; pim_bcast_req.cmd = PIM_WRB; pim_bcast_req.col = 7'(col); pim_bcast_req.wr_mask = 4'hF;
  @(posedge clk); #1 pim_bcast = 0;
  for (int b = 0; b < NB; b++)
    if (mask[b])
      for (int j = 0; j < 4; j++) xd[b][4*col+j] = (j < NC) ? yv[src][j] : 0;
endtask

task automatic pim_step(input logic [NB-1:0] mask);
  @(posedge clk); #1 pim_step_mask = mask; pim_step_start = 1;
  @(posedge clk); #1 pim_step_start = 0;
  while ((pim_step_busy & mask) != '0) @(posedge clk);
  #1;
endtask
