// pim_spu: secondary processing unit at the secondary sense amplifiers.
//
// One per column of sub-arrays (CSA), i.e. per LSTM cell.  A sequential adder
// adds each 8-bit partial dot product arriving over the master bitlines to
// the 16-bit partial sum of buffer entry sel (16 entries of 16 bits).  When
// the transfer is flagged dot-product done, the result is not written back
// but, with the entry's bias added, goes to the activation function; the
// entry is cleared for the next time step.  Entries 0..3 hold the gates
// a (tanh), i, f, o (sigmoid); their 2-bit activations are kept.  On an
// entry >= 4 (fully connected layer, FC bank) the finished sum is kept in
// fc_sum instead.  cell_go then computes
//   c(t) = i*a + f*c(t-1),   y(t) = o * tanh(c(t))
// with c kept as 8-bit signed, 4 fraction bits, and y 2-bit (Q1.1).
// c_clr clears c(t-1) at the start of a sequence.
// Timing: one cycle per transfer (add), one cycle for the cell update;
// y_valid pulses with the new y.  Adder, buffer, done multiplexer and
// activation functions are the architecture's (buffer 16 x 16 bit); the
// bias registers, gate order and c format are this design's choices.
module pim_spu (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,     // partial dot product on the MBL
  input  logic signed [7:0] in_dot,
  input  logic [3:0]        sel,
  input  logic              done,
  input  logic              bias_we,
  input  logic [3:0]        bias_sel,
  input  logic [15:0]       bias_data,    // same fixed point as the sums
  input  logic              cell_go,
  input  logic              c_clr,        // start of a sequence: c(t-1) = 0
  output logic [1:0]        y,
  output logic              y_valid,
  output logic [15:0]       fc_sum,
  output logic              fc_valid
);
  logic signed [15:0] buffer [16];
  logic signed [15:0] bias   [4];
  logic [1:0]         gate   [4];     // a, i, f, o
  logic signed [7:0]  c;

  logic signed [15:0] sum, act_in;
  logic [1:0]         act_q;
  assign sum    = buffer[sel] + 16'(in_dot);
  assign act_in = sum + ((sel < 4) ? bias[sel[1:0]] : 16'sd0);

  pim_pwl_act #(.IN_W(16), .FRAC_IN(1)) u_act (.x(act_in), .tanh_sel(sel == 4'd0), .q(act_q));

  // cell update
  logic signed [7:0] c_new;
  logic [1:0]        th, y_new;
  always_comb begin
    int ia, fc, t;
    ia = int'($signed(gate[0])) * int'(gate[1]);   // Q1.1 * Q0.2 -> 3 fraction bits
    fc = int'(gate[2]) * int'(c);                 // Q0.2 * Q4.4 -> 6 fraction bits
    t  = (ia <<< 1) + (fc >>> 2);                 // 4 fraction bits
    if (t > 127) t = 127;
    if (t < -128) t = -128;
    c_new = 8'(t);
  end
  pim_pwl_act #(.IN_W(8), .FRAC_IN(4)) u_tanh (.x(c_new), .tanh_sel(1'b1), .q(th));
  always_comb begin
    int t;
    t = int'(gate[3]) * int'($signed(th));        // 3 fraction bits
    t = (t + 2) >>> 2;                            // round to 1 fraction bit
    if (t > 1) t = 1;
    if (t < -2) t = -2;
    y_new = 2'(t);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 16; k++) buffer[k] <= '0;
      for (int k = 0; k < 4; k++) begin
        bias[k] <= '0;
        gate[k] <= '0;
      end
      c <= '0; y <= '0; y_valid <= 1'b0; fc_sum <= '0; fc_valid <= 1'b0;
    end else begin
      y_valid  <= 1'b0;
      fc_valid <= 1'b0;
      if (bias_we && bias_sel < 4) bias[bias_sel[1:0]] <= $signed(bias_data);
      if (in_valid) begin
        if (!done) buffer[sel] <= sum;
        else begin
          buffer[sel] <= '0;
          if (sel < 4) gate[sel[1:0]] <= act_q;
          else begin
            fc_sum   <= sum;
            fc_valid <= 1'b1;
          end
        end
      end
      if (c_clr) c <= '0;
      if (cell_go) begin
        c       <= c_new;
        y       <= y_new;
        y_valid <= 1'b1;
      end
    end
  end
endmodule
