// hidden_layer: the 2D-LSTM hidden layer core.
//
// For every pixel step the core processes the four scan directions one after
// the other (interleaving), and for each direction-step it evaluates all NH
// memory cells, PE_LSTM of them per clock cycle.  Per cell it forms the five
// gate pre-activations of Eq. 2 with full-width dot products
// (SIMD_INPUT = C, SIMD_RECURRENT = NH):
//   s = W*x(i,j) + U*y(i-1,j) + V*y(i,j-1) + b
// passes them through the activation tables (tanh for a, sigmoid for k,f,g,o)
// and computes
//   c = f*c(i-1,j) + g*c(i,j-1) + a*k,   y = o*tanh(c).
// The recurrent vectors y/c of the previous column come from the X-axis
// buffer and those of the previous row from the Y-axis buffer; both are read
// (popped) when a direction-step starts and are replaced by zeros in the first
// column/row of the scan.  The outputs leave through a valid/ready stream; the
// same transfer feeds the two recurrent-path width converters.
//
// Interfaces:
//   x_*      input pixels (C elements of XW bits, unsigned fraction), already in
//            direction-interleaved order TL, TR, BL, BR for each pixel step.
//   rx_*/ry_* read side of the X-/Y-axis buffers: word = {c[NH], y[NH]}.
//   out_*    y and c of PE_LSTM cells plus hl_meta_t side band.
//   wr_*     element-wise write of weights (wr_sel=0) and biases (wr_sel=1).
//            Weight index: {cell, gate, input} with input 0..C-1 = W,
//            C..C+NH-1 = U, C+NH..C+2NH-1 = V.  Bias index: {cell, gate}.
// Timing: 5 register stages from a group issue to out_valid.  A new
// direction-step starts only when the previous step of the same direction has
// left the pipeline (recurrence hazard); with NH/PE_LSTM >= 2 groups per step
// this never stalls.  restart resets the pixel position to the patch origin.
//
// The architecture (interleaving, PE/SIMD unrolling, buffers, Eq. 2) is the
// document's; the fixed-point formats, the LUT resolution, the pipeline depth
// and the zero masking at the borders are this design's choices.
module hidden_layer
  import mdlstm_pkg::*;
#(
  parameter int unsigned C       = 3,
  parameter int unsigned NH      = 40,
  parameter int unsigned W       = 64,
  parameter int unsigned H       = 64,
  parameter int unsigned PE_LSTM = 1,
  parameter int unsigned XW      = 8,
  parameter int unsigned WW      = 4,
  parameter int unsigned BW      = 8,
  parameter int unsigned YW      = 4,
  parameter int unsigned AW      = 8,   // activation table output width
  parameter int unsigned CW      = 16   // cell state width, 7 fraction bits
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   restart,
  // input pixels
  input  logic                   x_valid,
  output logic                   x_ready,
  input  logic [C*XW-1:0]        x_data,
  // recurrent buffers
  input  logic [NH*(YW+CW)-1:0]  rx_data,
  output logic                   rx_pop,
  input  logic [NH*(YW+CW)-1:0]  ry_data,
  output logic                   ry_pop,
  // outputs
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [PE_LSTM*YW-1:0]  out_y,
  output logic [PE_LSTM*CW-1:0]  out_c,
  output hl_meta_t               out_meta,
  // parameter load
  input  logic                   wr_en,
  input  logic                   wr_sel,
  input  logic [31:0]            wr_idx,
  input  logic [31:0]            wr_data,
  // observation
  output logic                   hazard_stall
);
  localparam int unsigned P    = PE_LSTM;
  localparam int unsigned NS   = NH / P;          // groups per direction-step
  localparam int unsigned NIN  = C + 2 * NH;      // inputs per gate
  localparam int unsigned IW   = $clog2(NIN);
  localparam int unsigned NW   = (NH > 1) ? $clog2(NH) : 1;
  localparam int unsigned XF   = XW;              // x fraction bits (unsigned)
  localparam int unsigned WF   = (WW > 1) ? WW - 1 : 0;
  localparam int unsigned YF   = YW - 1;
  localparam int unsigned BF   = BW - 1;
  localparam int unsigned FA   = XF + WF;         // accumulator fraction bits
  localparam int unsigned LF   = 4;               // table index fraction bits
  localparam int unsigned CF   = 7;               // cell state fraction bits

  initial begin
    assert (NH % P == 0) else $error("PE_LSTM must divide NH");
    assert (FA >= YF + WF && FA >= BF && FA >= LF) else $error("unsupported fixed-point widths");
  end

  // ---------------- parameter memories ----------------
  logic [WW-1:0] wmem [NH][NGATES][NIN];
  logic [BW-1:0] bmem [NH][NGATES];

  always_ff @(posedge clk) begin
    if (wr_en && !wr_sel && wr_idx[IW+3 +: NW] < NH && wr_idx[IW +: 3] < NGATES && wr_idx[IW-1:0] < NIN)
      wmem[wr_idx[IW+3 +: NW]][wr_idx[IW +: 3]][wr_idx[IW-1:0]] <= wr_data[WW-1:0];
    if (wr_en && wr_sel && wr_idx[3 +: NW] < NH && wr_idx[2:0] < NGATES)
      bmem[wr_idx[3 +: NW]][wr_idx[2:0]] <= wr_data[BW-1:0];
  end

  // ---------------- global pipeline enable ----------------
  logic en;
  assign en = !(out_valid && !out_ready);

  // ---------------- step sequencer ----------------
  logic              active;
  logic [15:0]       grp;
  logic [1:0]        pos_d;
  logic [15:0]       pos_col, pos_row;
  logic [7:0]        started, retired;   // direction-steps issued / written back
  logic [C*XW-1:0]   s_x;
  logic [YW-1:0]     s_yx [NH];
  logic [YW-1:0]     s_yy [NH];
  logic [CW-1:0]     s_cx [NH];
  logic [CW-1:0]     s_cy [NH];
  hl_meta_t          s_meta;

  logic last_issue, can_load, load, hazard_ok;
  assign last_issue = active && (grp == 16'(NS - 1));
  assign hazard_ok  = 8'(started - retired) < 8'd4;
  assign can_load   = en && (!active || last_issue);
  assign load       = can_load && x_valid && hazard_ok;
  assign x_ready    = can_load && hazard_ok;
  assign rx_pop     = load;
  assign ry_pop     = load;
  assign hazard_stall = can_load && x_valid && !hazard_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      grp     <= '0;
      pos_d   <= '0;
      pos_col <= '0;
      pos_row <= '0;
      started <= '0;
    end else begin
      if (restart) begin
        pos_d   <= '0;
        pos_col <= '0;
        pos_row <= '0;
      end
      if (en && active) grp <= last_issue ? '0 : grp + 16'd1;
      if (can_load) active <= load ? 1'b1 : (active && !last_issue);
      if (load) begin
        started <= started + 8'd1;
        pos_d   <= pos_d + 2'd1;
        if (pos_d == 2'd3) begin
          if (pos_col == 16'(W - 1)) begin
            pos_col <= '0;
            pos_row <= (pos_row == 16'(H - 1)) ? '0 : pos_row + 16'd1;
          end else begin
            pos_col <= pos_col + 16'd1;
          end
        end
      end
    end
  end

  // step registers: operands shared by all groups of a direction-step
  always_ff @(posedge clk) begin
    if (load) begin
      s_x <= x_data;
      for (int n = 0; n < int'(NH); n++) begin
        s_yx[n] <= (pos_col == 0) ? '0 : rx_data[n*YW +: YW];
        s_cx[n] <= (pos_col == 0) ? '0 : rx_data[NH*YW + n*CW +: CW];
        s_yy[n] <= (pos_row == 0) ? '0 : ry_data[n*YW +: YW];
        s_cy[n] <= (pos_row == 0) ? '0 : ry_data[NH*YW + n*CW +: CW];
      end
      s_meta.dir       <= pos_d;
      s_meta.col       <= pos_col;
      s_meta.row       <= pos_row;
      s_meta.grp       <= '0;
      s_meta.last_grp  <= 1'b0;
      s_meta.last_step <= (pos_d == 2'd3) && (pos_col == 16'(W - 1)) && (pos_row == 16'(H - 1));
    end
  end

  // ---------------- stage 1: operands + weight read ----------------
  logic              p1_v;
  hl_meta_t          p1_meta;
  logic [C*XW-1:0]   p1_x;
  logic [YW-1:0]     p1_yx [NH];
  logic [YW-1:0]     p1_yy [NH];
  logic [CW-1:0]     p1_cx [P];
  logic [CW-1:0]     p1_cy [P];
  logic [WW-1:0]     p1_w  [P][NGATES][NIN];
  logic [BW-1:0]     p1_b  [P][NGATES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p1_v <= 1'b0;
    else if (en) p1_v <= active;
  end

  always_ff @(posedge clk) begin
    if (en && active) begin
      p1_meta          <= s_meta;
      p1_meta.grp      <= grp;
      p1_meta.last_grp <= last_issue;
      p1_meta.last_step <= s_meta.last_step && last_issue;
      p1_x  <= s_x;
      p1_yx <= s_yx;
      p1_yy <= s_yy;
      for (int p = 0; p < int'(P); p++) begin
        p1_cx[p] <= s_cx[int'(grp) * P + p];
        p1_cy[p] <= s_cy[int'(grp) * P + p];
        p1_w[p]  <= wmem[int'(grp) * P + p];
        p1_b[p]  <= bmem[int'(grp) * P + p];
      end
    end
  end

  // ---------------- stage 2: dot products -> table index ----------------
  logic              p2_v;
  hl_meta_t          p2_meta;
  logic [CW-1:0]     p2_cx [P];
  logic [CW-1:0]     p2_cy [P];
  logic [7:0]        p2_idx [P][NGATES];
  logic [7:0]        dp_idx [P][NGATES];

  always_comb begin
    for (int p = 0; p < int'(P); p++) begin
      for (int g = 0; g < int'(NGATES); g++) begin
        longint signed acc;
        acc = longint'(wval(32'(p1_b[p][g]), BW)) <<< (FA - BF);
        for (int i = 0; i < int'(C); i++)
          acc += longint'(p1_x[i*XW +: XW]) * longint'(wval(32'(p1_w[p][g][i]), WW));
        for (int i = 0; i < int'(NH); i++) begin
          acc += (longint'(wval(32'(p1_yx[i]), YW)) * longint'(wval(32'(p1_w[p][g][C + i]), WW))) <<< (FA - YF - WF);
          acc += (longint'(wval(32'(p1_yy[i]), YW)) * longint'(wval(32'(p1_w[p][g][C + NH + i]), WW))) <<< (FA - YF - WF);
        end
        dp_idx[p][g] = 8'(sat(acc >>> (FA - LF), 8));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p2_v <= 1'b0;
    else if (en) p2_v <= p1_v;
  end
  always_ff @(posedge clk) begin
    if (en) begin
      p2_meta <= p1_meta;
      p2_cx   <= p1_cx;
      p2_cy   <= p1_cy;
      p2_idx  <= dp_idx;
    end
  end

  // ---------------- stage 3: activation tables ----------------
  logic [AW-1:0] act [P][NGATES];
  for (genvar p = 0; p < int'(P); p++) begin : g_act
    for (genvar g = 0; g < int'(NGATES); g++) begin : g_gate
      act_lut #(.TANH(g == int'(G_A)), .IN_W(8), .FRAC_IN(LF), .OUT_W(AW))
        u_lut (.idx(p2_idx[p][g]), .q(act[p][g]));
    end
  end

  logic              p3_v;
  hl_meta_t          p3_meta;
  logic [CW-1:0]     p3_cx [P];
  logic [CW-1:0]     p3_cy [P];
  logic [AW-1:0]     p3_act [P][NGATES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p3_v <= 1'b0;
    else if (en) p3_v <= p2_v;
  end
  always_ff @(posedge clk) begin
    if (en) begin
      p3_meta <= p2_meta;
      p3_cx   <= p2_cx;
      p3_cy   <= p2_cy;
      p3_act  <= act;
    end
  end

  // ---------------- stage 4: cell state ----------------
  logic [CW-1:0] c_new [P];
  always_comb begin
    for (int p = 0; p < int'(P); p++) begin
      longint signed t;
      t = (longint'(p3_act[p][G_F]) * longint'($signed(p3_cx[p]))
         + longint'(p3_act[p][G_G]) * longint'($signed(p3_cy[p]))
         + longint'($signed(p3_act[p][G_A])) * longint'(p3_act[p][G_K]) * longint'(1 << CF)
           / longint'(1 << (AW - 1))) >>> AW;
      c_new[p] = CW'(sat(t, CW));
    end
  end

  logic              p4_v;
  hl_meta_t          p4_meta;
  logic [CW-1:0]     p4_c [P];
  logic [AW-1:0]     p4_o [P];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p4_v <= 1'b0;
    else if (en) p4_v <= p3_v;
  end
  always_ff @(posedge clk) begin
    if (en) begin
      p4_meta <= p3_meta;
      p4_c    <= c_new;
      for (int p = 0; p < int'(P); p++) p4_o[p] <= p3_act[p][G_O];
    end
  end

  // ---------------- stage 5: y = o * tanh(c) ----------------
  logic [7:0]    th_idx [P];
  logic [AW-1:0] th     [P];
  logic [YW-1:0] y_new  [P];
  for (genvar p = 0; p < int'(P); p++) begin : g_tanh
    assign th_idx[p] = 8'(sat(longint'($signed(p4_c[p])) >>> (CF - LF), 8));
    act_lut #(.TANH(1'b1), .IN_W(8), .FRAC_IN(LF), .OUT_W(AW))
      u_tanh (.idx(th_idx[p]), .q(th[p]));
  end
  always_comb begin
    for (int p = 0; p < int'(P); p++) begin
      longint signed t;
      t = longint'(p4_o[p]) * longint'($signed(th[p]));         // 2*AW-1 fraction bits
      t = (t + (longint'(1) <<< (2 * AW - 2 - YF))) >>> (2 * AW - 1 - YF);
      y_new[p] = YW'(sat(t, YW));
    end
  end

  logic p5_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p5_v <= 1'b0;
    else if (en) p5_v <= p4_v;
  end
  always_ff @(posedge clk) begin
    if (en) begin
      out_meta <= p4_meta;
      for (int p = 0; p < int'(P); p++) begin
        out_y[p*YW +: YW] <= y_new[p];
        out_c[p*CW +: CW] <= p4_c[p];
      end
    end
  end
  assign out_valid = p5_v;

  // write-back counter for the recurrence hazard
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) retired <= '0;
    else if (out_valid && out_ready && out_meta.last_grp) retired <= retired + 8'd1;
  end

endmodule
