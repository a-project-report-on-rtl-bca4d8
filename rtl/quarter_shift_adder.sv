// quarter_shift_adder: the 2-bit adder SM1 of the generator.
//
// Adding 1 to the two most significant phase bits moves the phase forward by
// a quarter period (90 degrees), so reading the sine table at the shifted
// phase yields the cosine. The output t2 keeps the published signal name:
// t2[1] is the sign of the cosine half wave and t2[0] the top address bit of
// the cosine ROM. The adder itself follows the published circuit; the split
// of t2 into sign and address bit is this design's reading of it.
//
// Interface: msb2 (phase bits [PHASE_W-1:PHASE_W-2]) in, t2 out.
// Timing: combinational.
module quarter_shift_adder (
  input  logic [1:0] msb2,
  output logic [1:0] t2
);
  assign t2 = msb2 + 2'd1;
endmodule
