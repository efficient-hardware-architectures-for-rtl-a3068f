// rec_dwc: recurrent-path data width converter.
//
// The hidden layer emits the y and c values of PE cells per transfer; the
// recurrent buffers are read SIMD_RECURRENT = NH values at a time.  This
// converter collects the NH/PE groups of one direction-step into one word
// {c[NH-1..0], y[NH-1..0]} and writes it to its buffer in the cycle the last
// group arrives (wr_en is combinational on that transfer, so the buffer holds
// the word at the next clock edge).  It never stalls its input.
// Group position comes from the side band of the hidden layer (grp,
// last_grp).  The function is the architecture's; the word layout is this
// design's choice.
module rec_dwc #(
  parameter int unsigned NH = 40,
  parameter int unsigned PE = 1,
  parameter int unsigned YW = 4,
  parameter int unsigned CW = 16
) (
  input  logic                  clk,
  input  logic                  in_fire,
  input  logic [15:0]           in_grp,
  input  logic                  in_last,
  input  logic [PE*YW-1:0]      in_y,
  input  logic [PE*CW-1:0]      in_c,
  output logic                  wr_en,
  output logic [NH*(YW+CW)-1:0] wr_data
);
  logic [YW-1:0] ys [NH];
  logic [CW-1:0] cs [NH];

  always_ff @(posedge clk) begin
    if (in_fire)
      for (int p = 0; p < int'(PE); p++) begin
        ys[int'(in_grp) * PE + p] <= in_y[p*YW +: YW];
        cs[int'(in_grp) * PE + p] <= in_c[p*CW +: CW];
      end
  end

  always_comb begin
    for (int n = 0; n < int'(NH); n++) begin
      wr_data[n*YW +: YW]         = ys[n];
      wr_data[NH*YW + n*CW +: CW] = cs[n];
    end
    // the group arriving now bypasses the registers
    for (int p = 0; p < int'(PE); p++) begin
      wr_data[(int'(in_grp) * PE + p)*YW +: YW]         = in_y[p*YW +: YW];
      wr_data[NH*YW + (int'(in_grp) * PE + p)*CW +: CW] = in_c[p*CW +: CW];
    end
  end
  assign wr_en = in_fire && in_last;
endmodule
