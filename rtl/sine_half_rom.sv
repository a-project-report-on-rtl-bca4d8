// sine_half_rom: one half period (0 to pi) of the sine function.
//
// Entry i holds round((2**(DATA_W-1) - 1) * sin(pi * i / 2**ADDR_W)), so the
// default table has 16 entries from 0 up to 32767 at i = 8 and back down to
// 6393 at i = 15. The second half of the period is produced outside the
// ROM by negating these samples. The table is computed at elaboration time
// from that formula, so both sizes can be changed. Storing half a period in a
// 16 x 16-bit ROM follows the published design; the amplitude 32767 is this
// design's choice (largest value whose negation still fits 16 signed bits).
//
// Interface: addr in, data out. Timing: combinational (asynchronous read).
module sine_half_rom #(
  parameter int unsigned ADDR_W = sincos_pkg::ROM_ADDR_W,
  parameter int unsigned DATA_W = sincos_pkg::ROM_DATA_W
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  typedef logic [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    real pi;
    real peak;
    pi   = 3.14159265358979323846;
    peak = (2.0 ** (DATA_W - 1)) - 1.0;
    for (int i = 0; i < DEPTH; i++)
      t[i] = DATA_W'($rtoi(peak * $sin(pi * i / DEPTH) + 0.5));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign data = TABLE[addr];
endmodule
