// output_layer: fully connected output layer of the 2D-LSTM accelerator.
//
// All NO output units work in parallel (PE_FC = FULL); each takes SIMD_FC =
// PE_LSTM hidden outputs per cycle, so the layer keeps pace with the hidden
// layer.  Per transfer every unit multiplies the PE_LSTM values y by its
// weights and sums them in an adder tree; the sums of the NH/PE_LSTM groups
// of one direction-step are accumulated locally and then added once to the
// partial sum of the pixel.
//   SEGMENT = 1 (pixel labelling): a matching buffer of H*W partial sums per
//     unit.  The pixel address is Row offset[dir][row] + Column index[dir][col],
//     two small tables that map each direction's scan position back to the
//     image.  The weights per unit are 4*NH (one set per direction).  After
//     the last step of a patch the buffer is read out in raster order, one
//     pixel per cycle, and each entry is reset to the bias as it is read; the
//     input is held off during the read-out.
//   SEGMENT = 0 (image classification): one accumulator per unit, weights
//     4*NH*H*W in stream order; one result per image.
// Values: y signed, YW-1 fraction bits; weights/bias signed, WFW-1/BFW-1
// fraction bits (1-bit weights are +-1); outputs z signed ZW bits with
// YW-1+WFW-1 fraction bits.
// init (or reset) loads the bias into all partial sums (H*W cycles in
// SEGMENT mode, during which in_ready is low).
// Timing: one register stage for the weight read, the read-modify-write of
// the partial sum in the next cycle.
// The unrolling, the matching buffer and the address tables are the
// architecture's; the local accumulation, the bias reset on read-out and the
// number formats are this design's choices.
module output_layer
  import mdlstm_pkg::*;
#(
  parameter int unsigned NH      = 40,
  parameter int unsigned PE_LSTM = 1,
  parameter int unsigned W       = 64,
  parameter int unsigned H       = 64,
  parameter int unsigned NO      = 2,
  parameter bit          SEGMENT = 1'b1,
  parameter int unsigned YW      = 4,
  parameter int unsigned WFW     = 8,
  parameter int unsigned BFW     = 8,
  parameter int unsigned ZW      = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  // hidden-layer outputs
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [PE_LSTM*YW-1:0] in_y,
  input  hl_meta_t             in_meta,
  // results (one pixel or one image per transfer)
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [NO*ZW-1:0]     out_z,
  output logic                 out_last,
  // parameter load: wr_sel 0 = weight {unit, input}, 1 = bias {unit}
  input  logic                 wr_en,
  input  logic                 wr_sel,
  input  logic [31:0]          wr_idx,
  input  logic [31:0]          wr_data
);
  localparam int unsigned P     = PE_LSTM;
  localparam int unsigned NPIX  = W * H;
  localparam int unsigned NFCIN = SEGMENT ? 4 * NH : 4 * NH * NPIX;
  localparam int unsigned IW    = $clog2(NFCIN);
  localparam int unsigned OW    = (NO > 1) ? $clog2(NO) : 1;
  localparam int unsigned PA    = (NPIX > 1) ? $clog2(NPIX) : 1;
  localparam int unsigned DEP   = SEGMENT ? NPIX : 1;
  localparam int unsigned YF    = YW - 1;
  localparam int unsigned WFF   = (WFW > 1) ? WFW - 1 : 0;
  localparam int unsigned BFF   = (BFW > 1) ? BFW - 1 : 0;

  // ---------------- parameters ----------------
  logic [WFW-1:0] wmem [NO][NFCIN];
  logic [BFW-1:0] bias [NO];
  always_ff @(posedge clk) begin
    if (wr_en && !wr_sel && wr_idx[IW +: OW] < NO && wr_idx[IW-1:0] < NFCIN)
      wmem[wr_idx[IW +: OW]][wr_idx[IW-1:0]] <= wr_data[WFW-1:0];
    if (wr_en && wr_sel && wr_idx[OW-1:0] < NO)
      bias[wr_idx[OW-1:0]] <= wr_data[BFW-1:0];
  end

  function automatic logic signed [ZW-1:0] bias_z(input int o);
    return ZW'(longint'(wval(32'(bias[o]), BFW)) <<< (YF + WFF - BFF));
  endfunction

  // ---------------- Row offset / Column index tables ----------------
  logic [PA-1:0] row_off [4][H];
  logic [PA-1:0] col_idx [4][W];
  for (genvar d = 0; d < 4; d++) begin : g_dir
    for (genvar r = 0; r < int'(H); r++) begin : g_r
      assign row_off[d][r] = PA'((d[1] ? (H - 1 - r) : r) * W);
    end
    for (genvar c = 0; c < int'(W); c++) begin : g_c
      assign col_idx[d][c] = PA'(d[0] ? (W - 1 - c) : c);
    end
  end

  // ---------------- control ----------------
  typedef enum logic [1:0] {S_INIT, S_RUN, S_DRAIN, S_EMIT} state_e;
  state_e        state;
  logic [PA-1:0] ptr;
  logic          hold;        // last step of the patch accepted, wait for drain

  logic accept;
  assign in_ready = (state == S_RUN) && !hold;
  assign accept   = in_valid && in_ready;

  // ---------------- stage A: weight read ----------------
  logic                 a_v;
  hl_meta_t             a_meta;
  logic [P*YW-1:0]      a_y;
  logic [WFW-1:0]       a_w [NO][P];
  logic [31:0]          base;

  always_comb begin
    if (SEGMENT) base = 32'(in_meta.dir) * NH + 32'(in_meta.grp) * P;
    else base = ((32'(in_meta.row) * W + 32'(in_meta.col)) * 4 + 32'(in_meta.dir)) * NH
                + 32'(in_meta.grp) * P;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_v <= 1'b0;
    else a_v <= accept;
  end
  always_ff @(posedge clk) begin
    if (accept) begin
      a_meta <= in_meta;
      a_y    <= in_y;
      for (int o = 0; o < int'(NO); o++)
        for (int p = 0; p < int'(P); p++)
          a_w[o][p] <= wmem[o][IW'(base + 32'(p))];
    end
  end

  // ---------------- stage B: tree, local accumulation, partial sums ----------------
  logic signed [ZW-1:0] tree [NO];
  logic signed [ZW-1:0] acc  [NO];
  logic signed [ZW-1:0] step_sum [NO];
  logic signed [ZW-1:0] psum [NO][DEP];
  logic [PA-1:0]        addr;

  always_comb begin
    for (int o = 0; o < int'(NO); o++) begin
      longint signed t;
      t = 0;
      for (int p = 0; p < int'(P); p++)
        t += longint'(wval(32'(a_y[p*YW +: YW]), YW)) * longint'(wval(32'(a_w[o][p]), WFW));
      tree[o]     = ZW'(t);
      step_sum[o] = (a_meta.grp == 0) ? tree[o] : acc[o] + tree[o];
    end
    addr = row_off[a_meta.dir][a_meta.row[$clog2(H > 1 ? H : 2)-1:0]]
         + col_idx[a_meta.dir][a_meta.col[$clog2(W > 1 ? W : 2)-1:0]];
  end

  logic [PA-1:0] daddr;
  assign daddr = SEGMENT ? addr : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT;
      ptr   <= '0;
      hold  <= 1'b0;
    end else begin
      if (accept && in_meta.last_step) hold <= 1'b1;
      unique case (state)
        S_INIT: begin
          ptr <= ptr + 1'b1;
          if (ptr == PA'(DEP - 1)) begin
            ptr   <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: if (a_v && a_meta.last_step) state <= SEGMENT ? S_DRAIN : S_EMIT;
        S_DRAIN: if (out_ready) begin
          ptr <= ptr + 1'b1;
          if (ptr == PA'(NPIX - 1)) begin
            ptr   <= '0;
            state <= S_RUN;
            hold  <= 1'b0;
          end
        end
        S_EMIT: if (out_ready) begin
          state <= S_RUN;
          hold  <= 1'b0;
        end
        default: state <= S_INIT;
      endcase
      if (init) begin
        state <= S_INIT;
        ptr   <= '0;
        hold  <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < int'(NO); o++) begin
      if (a_v) acc[o] <= step_sum[o];
      if (state == S_INIT) psum[o][ptr] <= bias_z(o);
      else if (state == S_DRAIN && out_ready) psum[o][ptr] <= bias_z(o);
      else if (state == S_EMIT && out_ready) psum[o][0] <= bias_z(o);
      else if (a_v && a_meta.last_grp) psum[o][daddr] <= psum[o][daddr] + step_sum[o];
    end
  end

  // ---------------- results ----------------
  always_comb begin
    for (int o = 0; o < int'(NO); o++)
      out_z[o*ZW +: ZW] = (state == S_DRAIN) ? psum[o][SEGMENT ? ptr : '0] : psum[o][0];
  end
  assign out_valid = (state == S_DRAIN) || (state == S_EMIT);
  assign out_last  = SEGMENT && (ptr == PA'(NPIX - 1));
endmodule
