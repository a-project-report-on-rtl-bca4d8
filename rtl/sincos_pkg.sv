// sincos_pkg: word sizes shared by the sine/cosine generator, its tan/cot
// divider unit and the combined-scheme mixer.
//
// The generator is a 32-bit phase accumulator whose phase addresses a
// 16-entry, 16-bit half-period sine table, giving 32 samples per period.
// Generator outputs are 32-bit two's complement words whose upper 17 bits
// are all copies of the sign (samples stay within +/-32767).
// FRAC_BITS, the fraction width of the tan/cot results, is this design's own
// choice; the other numbers follow the published generator.
package sincos_pkg;
  localparam int unsigned PHASE_W   = 32;  // phase accumulator / frequency word
  localparam int unsigned ROM_ADDR_W = 4;  // half period = 2**4 samples
  localparam int unsigned ROM_DATA_W = 16; // table word
  localparam int unsigned OUT_W     = 32;  // sin_o / cos_o width
  localparam int unsigned FRAC_BITS = 16;  // fraction bits of tan / cot

  // Peak value stored in the table: 2**(ROM_DATA_W-1) - 1.
  localparam int unsigned AMPLITUDE = (1 << (ROM_DATA_W - 1)) - 1;
endpackage
