// sin_gen: lookup-table sine and cosine generator (the SIN_GEN circuit).
//
// A phase accumulator (SMP + RgP) adds the frequency word f every clock.
// Its phase P is split into three fields:
//   P[PHASE_W-1]                    half-wave sign of the sine
//   P[PHASE_W-2 -: ADDR_W]          sample index inside the half period
//   P[PHASE_W-1 -: 2]               quadrant, used for the cosine
// ROM S1 is read at the sample index and the sine adder SMS negates the
// sample when the sign bit is 1. For the cosine, SM1 adds 1 to the two
// quadrant bits (a +90 degree shift); its result t2 gives the cosine sign
// (t2[1]) and the top bit of the ROM S2 address (t2[0]), the remaining
// address bits come straight from P. SMC negates the ROM S2 sample when t2[1]
// is 1. RgS and RgC hold the results. With the default sizes one period is
// 32 samples and the output frequency is f * fclk / 2**32.
//
// The structure (one accumulator, two half-period ROMs, SM1, two sign
// adders, three registers) follows the published circuit; the exact bit
// fields and the extra 'phase' output are this design's reading of it.
//
// Interface: clk, rst (async, active high), f; sin_o, cos_o (signed OUT_W,
// upper bits are sign copies), phase (RgP).
// Timing: one new sample per clock. sin_o/cos_o on a given clock belong to
// the phase that RgP held one clock earlier.
module sin_gen #(
  parameter int unsigned PHASE_W = sincos_pkg::PHASE_W,
  parameter int unsigned ADDR_W  = sincos_pkg::ROM_ADDR_W,
  parameter int unsigned DATA_W  = sincos_pkg::ROM_DATA_W,
  parameter int unsigned OUT_W   = sincos_pkg::OUT_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [PHASE_W-1:0]      f,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o,
  output logic [PHASE_W-1:0]      phase
);
  logic [ADDR_W-1:0] sin_addr;
  logic [ADDR_W-1:0] cos_addr;
  logic [DATA_W-1:0] sin_u;
  logic [DATA_W-1:0] cos_u;
  logic [1:0]        t2;

  phase_accumulator #(.PHASE_W(PHASE_W)) u_smp (
    .clk  (clk),
    .rst  (rst),
    .f    (f),
    .phase(phase)
  );

  quarter_shift_adder u_sm1 (
    .msb2(phase[PHASE_W-1 -: 2]),
    .t2  (t2)
  );

  assign sin_addr = phase[PHASE_W-2 -: ADDR_W];
  if (ADDR_W > 1) begin : g_cos_addr
    assign cos_addr = {t2[0], phase[PHASE_W-3 -: ADDR_W-1]};
  end else begin : g_cos_addr1
    assign cos_addr = t2[0];
  end

  sine_half_rom #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_rom_s1 (
    .addr(sin_addr),
    .data(sin_u)
  );

  sine_half_rom #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_rom_s2 (
    .addr(cos_addr),
    .data(cos_u)
  );

  sign_adder_reg #(.IN_W(DATA_W), .OUT_W(OUT_W)) u_sms (
    .clk   (clk),
    .rst   (rst),
    .negate(phase[PHASE_W-1]),
    .u     (sin_u),
    .y     (sin_o)
  );

  sign_adder_reg #(.IN_W(DATA_W), .OUT_W(OUT_W)) u_smc (
    .clk   (clk),
    .rst   (rst),
    .negate(t2[1]),
    .u     (cos_u),
    .y     (cos_o)
  );
endmodule
