// pim_ctrl: PIM control logic of a bank: runs one LSTM time step.
//
// Mapping (this design's, following the architecture's rules): block g of
// the bank holds gate g (a, i, f, o) of all the bank's cells, one cell per
// CSA.  In every sub-array the weight row is W_ROW and the data row
// (x(t) followed by y(t-1), 2 bits per element) is D_ROW; the weights and
// data of one gate are aligned column by column.  For each gate the sequence
// is: ACT weight row, LATCH it into the shadow latches, ACT the data row,
// then MAC for units 0..NU-1 into SPU entry g, the last one flagged done.
// After the four gates it waits two cycles (transfer + add) and issues CELL.
// done pulses with the CELL command; the new y(t) is then valid in every SPU.
// One command per cycle; the gates are handled one after the other.
module pim_ctrl
  import pim_pkg::*;
#(
  parameter int unsigned NU    = 5,   // dot-product units per gate (ceil(inputs/32))
  parameter int unsigned W_ROW = 0,
  parameter int unsigned D_ROW = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output logic     busy,
  output logic     done,
  output pim_req_t req,
  output logic     req_valid
);
  typedef enum logic [2:0] {C_IDLE, C_ACTW, C_LATCH, C_ACTD, C_MAC, C_WAIT, C_CELL} cstate_e;
  cstate_e    st;
  logic [1:0] g;
  logic [3:0] u;
  logic [1:0] w;

  assign busy = (st != C_IDLE);

  always_comb begin
    req       = '0;
    req.blk   = g;
    req.unit  = u;
    req.sel   = {2'b00, g};
    req_valid = 1'b1;
    unique case (st)
      C_ACTW:  begin req.cmd = PIM_ACT; req.row = 10'(W_ROW); end
      C_LATCH: req.cmd = PIM_LATCH;
      C_ACTD:  begin req.cmd = PIM_ACT; req.row = 10'(D_ROW); end
      C_MAC:   begin req.cmd = PIM_MAC; req.done = (u == 4'(NU - 1)); end
      C_CELL:  req.cmd = PIM_CELL;
      default: begin req.cmd = PIM_NOP; req_valid = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; g <= '0; u <= '0; w <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE:  if (start) begin st <= C_ACTW; g <= '0; end
        C_ACTW:  st <= C_LATCH;
        C_LATCH: st <= C_ACTD;
        C_ACTD:  begin st <= C_MAC; u <= '0; end
        C_MAC:   if (u == 4'(NU - 1)) begin
                   if (g == 2'd3) begin st <= C_WAIT; w <= '0; end
                   else begin g <= g + 2'd1; st <= C_ACTW; end
                 end else u <= u + 4'd1;
        C_WAIT:  begin w <= w + 2'd1; if (w == 2'd1) st <= C_CELL; end
        C_CELL:  begin st <= C_IDLE; done <= 1'b1; end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
