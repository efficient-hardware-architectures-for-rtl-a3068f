// tb_mdlstm_accel: end-to-end test of the 2D-LSTM accelerator at a small
// size (C=2, NH=4, W=3, H=2, NO=2, PE_LSTM=NH so that direction-steps are
// short enough to hit the hazard stall).  The host loads random hidden- and
// output-layer parameters over AXI4-Lite, places two direction-interleaved
// patches in the AXI memory model (random read gaps, random write
// back-pressure), starts one run and waits for done; then every pixel label
// is compared with a reference model.  Counts the mechanisms (hazard stall,
// output drain, input/output back-pressure, multi-beat bursts) and fails if
// any of them never happened.
module tb_mdlstm_accel;
  import mdlstm_ref::*;
  localparam int BUS_W = 64, C = 2, NH = 4, W = 3, H = 2, NO = 2, P = 4;
  localparam int NIN = C + 2 * NH, IW = $clog2(NIN), NPATCH = 2;
  localparam int NELEM = NPATCH * 4 * W * H * C, N_IN = (NELEM + 7) / 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] s_awaddr = 0, s_wdata = 0, s_araddr = 0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic [31:0] m_araddr, m_awaddr; logic [7:0] m_arlen, m_awlen; logic [2:0] m_arsize, m_awsize;
  logic [1:0] m_arburst, m_awburst, m_bresp;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [BUS_W-1:0] m_rdata, m_wdata; logic [BUS_W/8-1:0] m_wstrb;
  logic obs_hazard_stall, obs_drain;

  mdlstm_accel #(.BUS_W(BUS_W), .C(C), .NH(NH), .W(W), .H(H), .NO(NO), .PE_LSTM(P)) dut (.*);
  axi_mem_model #(.BUS_W(BUS_W), .DEPTH(1024)) mem (
    .clk, .rst_n, .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready));
  `include "axil_host.svh"

  initial begin repeat (200000) @(posedge clk); failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int wq [NH][5][NIN];
  int bq [NH][5];
  int fw [NO][4*NH];
  int fb [NO];
  int img [NPATCH][H][W][C];
  int yref [4][H][W][NH];
  int cref [4][H][W][NH];
  int lbl [NPATCH][H][W];
  int yall [NPATCH][4][H][W][NH];

  task automatic compute_ref(input int pt);
    for (int d = 0; d < 4; d++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          int gr, gc;
          gr = ((d & 2) != 0) ? H - 1 - r : r;
          gc = ((d & 1) != 0) ? W - 1 - c : c;
          for (int n = 0; n < NH; n++) begin
            int act [5];
            longint t, yt;
            int cx, cy, cc, th;
            for (int g = 0; g < 5; g++) begin
              longint acc;
              acc = longint'(bq[n][g]) <<< (11 - 7);
              for (int i = 0; i < C; i++) acc += longint'(img[pt][gr][gc][i]) * wq[n][g][i];
              for (int i = 0; i < NH; i++) begin
                acc += longint'((c > 0) ? yref[d][r][c-1][i] : 0) * wq[n][g][C+i] <<< 5;
                acc += longint'((r > 0) ? yref[d][r-1][c][i] : 0) * wq[n][g][C+NH+i] <<< 5;
              end
              act[g] = (g == 0) ? tanh8(clampi(acc >>> 7, -128, 127)) : sig8(clampi(acc >>> 7, -128, 127));
            end
            cx = (c > 0) ? cref[d][r][c-1][n] : 0;
            cy = (r > 0) ? cref[d][r-1][c][n] : 0;
            t  = (longint'(act[2]) * cx + longint'(act[3]) * cy + longint'(act[0]) * act[1]) >>> 8;
            cc = clampi(t, -32768, 32767);
            th = tanh8(clampi(cc >>> 3, -128, 127));
            yt = longint'(act[4]) * th;
            cref[d][r][c][n] = cc;
            yref[d][r][c][n] = clampi((yt + (1 << 11)) >>> 12, -8, 7);
          end
        end
    yall[pt] = yref;
    for (int pr = 0; pr < H; pr++) for (int pc = 0; pc < W; pc++) begin
      longint z [NO];
      int best;
      for (int o = 0; o < NO; o++) begin
        z[o] = longint'(fb[o]) <<< 3;
        for (int d = 0; d < 4; d++) begin
          int r, c;
          r = ((d & 2) != 0) ? H - 1 - pr : pr;
          c = ((d & 1) != 0) ? W - 1 - pc : pc;
          for (int n = 0; n < NH; n++) z[o] += longint'(yref[d][r][c][n]) * fw[o][d*NH+n];
        end
      end
      best = 0;
      for (int o = 1; o < NO; o++) if (z[o] > z[best]) best = o;
      lbl[pt][pr][pc] = best;
    end
  endtask

  // hidden-layer outputs inside the accelerator (PE_LSTM = NH: one transfer per direction-step)
  int hstep = 0, h_bad = 0;
  always @(posedge clk) if (rst_n && dut.h_fire) begin
    int pt, sp, d, c, r, v;
    pt = hstep / (4 * W * H); sp = hstep % (4 * W * H);
    d = sp % 4; c = (sp / 4) % W; r = (sp / 4) / W;
    for (int n = 0; n < NH; n++) begin
      v = int'($signed(dut.h_y[n*4 +: 4]));
      if (pt < NPATCH && v != yall[pt][d][r][c][n]) begin
        h_bad++; $display("hidden y patch %0d step %0d cell %0d: %0d exp %0d", pt, sp, n, v, yall[pt][d][r][c][n]);
      end
    end
    hstep++;
  end

  // mechanism counters
  int n_stall = 0, n_drain = 0, n_in_bp = 0, n_out_bp = 0;
  always @(posedge clk) if (rst_n) begin
    if (obs_hazard_stall) n_stall++;
    if (obs_drain) n_drain++;
    if (m_rvalid && !m_rready) n_in_bp++;
    if (m_wvalid && !m_wready) n_out_bp++;
  end

  initial begin
    logic [31:0] st;
    int e;
    for (int n = 0; n < NH; n++) for (int g = 0; g < 5; g++) begin
      bq[n][g] = $urandom_range(0, 255) - 128;
      for (int i = 0; i < NIN; i++) wq[n][g][i] = $urandom_range(0, 15) - 8;
    end
    for (int o = 0; o < NO; o++) begin
      fb[o] = $urandom_range(0, 255) - 128;
      for (int i = 0; i < 4 * NH; i++) fw[o][i] = $urandom_range(0, 255) - 128;
    end
    for (int i = 0; i < 1024; i++) mem.mem[i] = '0;
    e = 0;
    for (int pt = 0; pt < NPATCH; pt++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) for (int i = 0; i < C; i++)
        img[pt][r][c][i] = $urandom_range(0, 255);
      // direction-interleaved stream
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) for (int d = 0; d < 4; d++)
        for (int i = 0; i < C; i++) begin
          int gr, gc;
          gr = ((d & 2) != 0) ? H - 1 - r : r;
          gc = ((d & 1) != 0) ? W - 1 - c : c;
          mem.mem[e / 8][(e % 8) * 8 +: 8] = 8'(img[pt][gr][gc][i]);
          e++;
        end
      compute_ref(pt);
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < NH; n++) for (int g = 0; g < 5; g++) begin
      for (int i = 0; i < NIN; i++) axil_write({4'd1, 26'((n << (IW + 3)) | (g << IW) | i), 2'b00}, 32'(wq[n][g][i]));
      axil_write({4'd2, 26'((n << 3) | g), 2'b00}, 32'(bq[n][g]));
    end
    for (int o = 0; o < NO; o++) begin
      for (int i = 0; i < 4 * NH; i++) axil_write({4'd3, 26'((o << 4) | i), 2'b00}, 32'(fw[o][i]));
      axil_write({4'd4, 26'(o), 2'b00}, 32'(fb[o]));
    end
    axil_write(32'h04, 32'h0);
    axil_write(32'h08, 32'h1000);
    axil_write(32'h0C, 32'(N_IN));
    axil_write(32'h10, 32'(NPATCH));
    axil_write(32'h00, 32'h1);
    do begin
      repeat (20) @(posedge clk);
      axil_read(32'h00, st);
    end while (st[1] == 1'b0);
    for (int pt = 0; pt < NPATCH; pt++) begin
      logic [63:0] word;
      word = mem.mem[32'h1000 / 8 + pt];
      for (int p = 0; p < W * H; p++) begin
        checks++;
        if (int'(word[p]) != lbl[pt][p / W][p % W]) begin
          failures++; $display("patch %0d pixel %0d label %0d exp %0d", pt, p, word[p], lbl[pt][p / W][p % W]);
        end
      end
      checks++;
      if (word[63:W*H] != '0) failures++;
    end
    $display("mechanisms: hazard_stall=%0d drain=%0d input_backpressure=%0d output_backpressure=%0d rd_bursts=%0d",
             n_stall, n_drain, n_in_bp, n_out_bp, mem.rd_bursts);
    checks += 2;
    if (h_bad != 0) failures++;
    if (hstep != NPATCH * 4 * W * H) begin failures++; $display("hidden steps %0d", hstep); end
    checks += 5;
    if (n_stall == 0) begin failures++; $display("hazard stall never happened"); end
    if (n_drain == 0) begin failures++; $display("drain never happened"); end
    if (n_in_bp == 0) begin failures++; $display("input back-pressure never happened"); end
    if (n_out_bp == 0) begin failures++; $display("output back-pressure never happened"); end
    if (mem.violations != 0 || mem.rd_bursts < 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
