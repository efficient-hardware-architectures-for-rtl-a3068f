// pim_mul_unit: binary-weight multiplier next to the primary sense amplifiers.
//
// Multiplies a 2-bit two's-complement data value d by a 1-bit weight
// (logic 0 = +1, logic 1 = -1).  The weight is stored twice, once beside each
// data bit, and held in the two shadow latches w_dup.  Each data bit is XORed
// with its weight copy; the two's complement converter then adds the weight's
// sign, giving the 3-bit product d or -d.  Purely combinational: the sense
// amplifier region has no clock.  The XOR/adder structure and the weight
// encoding are the architecture's; signed data is this design's reading.
module pim_mul_unit (
  input  logic [1:0]        w_dup,   // duplicated weight bit (shadow latches)
  input  logic [1:0]        d,       // data from the sense amplifiers
  output logic signed [2:0] p
);
  logic s1, s0, sign;
  assign s1   = d[1] ^ w_dup[1];
  assign s0   = d[0] ^ w_dup[0];
  assign sign = w_dup[1];
  assign p    = $signed({s1, s1, s0}) + $signed({2'b00, sign});
endmodule
