// dwc_in: input data width converter of the 2D-LSTM accelerator.
//
// Splits each BUS_W-bit word from Mem2Stream into BUS_W/ELEM_W elements
// (lowest bits first) and regroups them OUT_N at a time (SIMD_INPUT) for the
// hidden layer.  A group may straddle two bus words.  Internally a shift
// register of IN_N+OUT_N elements with a fill count; a word is accepted
// whenever it fits, a group is offered whenever OUT_N elements are present.
// Both sides are valid/ready streams.  The function is the architecture's;
// the element order is this design's choice.
module dwc_in #(
  parameter int unsigned BUS_W  = 64,
  parameter int unsigned ELEM_W = 8,
  parameter int unsigned OUT_N  = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    restart,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [BUS_W-1:0]        in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [OUT_N*ELEM_W-1:0] out_data
);
  localparam int unsigned IN_N = BUS_W / ELEM_W;
  localparam int unsigned CAP  = IN_N + OUT_N;
  localparam int unsigned CNTW = $clog2(CAP + 1);

  logic [ELEM_W-1:0] buf_q [CAP];
  logic [CNTW-1:0]   cnt;
  logic              take, give;

  assign out_valid = cnt >= CNTW'(OUT_N);
  assign give      = out_valid && out_ready;
  assign in_ready  = (int'(cnt) - (give ? int'(OUT_N) : 0)) <= int'(CAP - IN_N);
  assign take      = in_valid && in_ready;
  for (genvar i = 0; i < int'(OUT_N); i++) begin : g_out
    assign out_data[i*ELEM_W +: ELEM_W] = buf_q[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (restart) cnt <= '0;
    else cnt <= CNTW'(int'(cnt) - (give ? int'(OUT_N) : 0) + (take ? int'(IN_N) : 0));
  end

  always_ff @(posedge clk) begin
    int base;
    base = int'(cnt) - (give ? int'(OUT_N) : 0);
    for (int i = 0; i < int'(CAP); i++) begin
      if (take && i >= base && i < base + int'(IN_N))
        buf_q[i] <= in_data[(i - base)*ELEM_W +: ELEM_W];
      else if (give && i + int'(OUT_N) < int'(CAP))
        buf_q[i] <= buf_q[i + int'(OUT_N)];
    end
  end
endmodule
