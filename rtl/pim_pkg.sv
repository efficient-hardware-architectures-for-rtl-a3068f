// pim_pkg: command encoding shared by the DRAM processing-in-memory (PIM)
// bank model of the binary 1D-LSTM engine.
//
// Every command that names a block acts on the same row/column/unit of all
// sub-arrays of that block (all CSAs), as the wordlines and column select
// lines of a DRAM block are shared.  The command set is this design's
// encoding of the operations the architecture performs: row activation and
// precharge, weight latching into the shadow latches, normal reads and
// writes, the multi-location write of y(t) (one byte into the gate sub-arrays of all
// CSAs at once), transfer of one
// dot-product unit result to the SPU, and the SPU cell update.
package pim_pkg;
  typedef enum logic [3:0] {
    PIM_NOP   = 4'd0,
    PIM_ACT   = 4'd1,   // open row `row` of block `blk`
    PIM_PRE   = 4'd2,   // close the open row of block `blk`
    PIM_LATCH = 4'd3,   // ISO switch: copy the sensed row into the shadow latches
    PIM_RD    = 4'd4,   // read 8 bits at column word `col` from 8 CSAs (`half`)
    PIM_WR    = 4'd5,   // write 8 bits at column word `col` into 8 CSAs (`half`)
    PIM_WRB   = 4'd6,   // write the same byte at `col` into the open rows of up to 4 blocks, all CSAs
    PIM_MAC   = 4'd7,   // transfer dot-product unit `unit` to the SPU, entry `sel`
    PIM_CELL  = 4'd8,   // SPU: c(t), y(t) from the four gate activations
    PIM_BIAS  = 4'd9,   // SPU bias of entry `sel` in CSA `col[3:0]`
    PIM_YOUT  = 4'd10,  // drive the bank's y(t) (16 x 2 bit) on the bus
    PIM_FCRD  = 4'd11,  // read the 16-bit FC sums (4 CSAs per 64-bit word, `col[1:0]`)
    PIM_CLR   = 4'd12   // SPU: clear the cell states c(t-1) (new sequence)
  } pim_cmd_e;

  typedef struct packed {
    pim_cmd_e    cmd;
    logic [1:0]  blk;       // MAC block (row of sub-arrays)
    logic [9:0]  row;
    logic [6:0]  col;       // 8-bit column word (1024 / 8 = 128)
    logic        half;      // which 8 of the 16 CSAs a RD/WR serves
    logic [3:0]  unit;      // dot-product unit selected by the CSL lines
    logic [3:0]  sel;       // SPU buffer entry
    logic        done;      // dot-product done: last partial sum of entry sel
    logic [3:0]  wr_mask;   // PIM_WRB: blocks written (multi-CSL write)
  } pim_req_t;
endpackage
