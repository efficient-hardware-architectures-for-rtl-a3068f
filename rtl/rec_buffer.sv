// rec_buffer: X-axis / Y-axis recurrent buffer of the 2D-LSTM accelerator.
//
// A delay line of DEPTH words: the k-th word written is returned by the
// (k+DEPTH)-th read.  With one word per direction-step and the four scan
// directions interleaved, DEPTH = 4 gives the previous column of the same
// direction (X-axis buffer, 4 x NH values) and DEPTH = 4*W the previous row
// (Y-axis buffer, W x 4 x NH values).  Read data is combinational at the read
// pointer; pop advances it.  Write and read pointers are separate so the
// write of a step may come several cycles after the read of a later step.
// restart (or reset) returns both pointers to 0.  Contents are not cleared:
// the hidden layer masks the first column and row.  Sizes follow the
// architecture; the delay-line organisation is this design's.
module rec_buffer #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned WIDTH = 800
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (restart) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)   rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
    end
  end

  always_ff @(posedge clk) if (wr_en) mem[wp] <= wr_data;
  assign rd_data = mem[rp];
endmodule
