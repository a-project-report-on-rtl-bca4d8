// sincos_top: sine/cosine generator with tangent/cotangent divider, a
// combined-scheme (two-generator) output, and the polynomial, recursive and
// rotating generators of the other schemes.
//
// The main generator u_gen is the lookup-table circuit: its phase
// accumulator steps by f, and it produces sin_o/cos_o, one sample per clock.
// Its sine and cosine registers also feed the divider unit, which
// turns a sample pair into tan = sin/cos and cot = cos/sin. The unit is
// restarted with the current sample as soon as it is idle, so tan_o/cot_o
// are refreshed every W+FRAC+1 clocks (49 at the defaults) with the tangent
// and cotangent of the sample present when the division started; tc_valid
// marks each refresh. For the combined scheme a second, fine-frequency
// generator u_fine steps by f_fine, and the mixer forms sin(x+y) and
// cos(x+y) from the main (x) and fine (y) samples, giving a wave whose
// phase step is f + f_fine at 32 samples per period each.
//
// The generator and the divider fed from its registers follow the
// published circuit. Reusing the main generator as the coarse generator of
// the combined scheme, the restart policy of the divider unit and the
// fixed-point formats are this design's choices.
//
// Next to the table-based generator stand the other three schemes that the
// combined scheme is said to superimpose, each with its own ports:
//   * u_poly: the polynomial sine/cosine of an angle tp_x
//     (tp_x / 2**(DATA_W-1) quarter turns);
//   * u_res: the recursive single-frequency oscillator
//     y(i) = 2cos(b) y(i-1) - y(i-2);
//   * u_rot: the rotating multiple-frequency oscillator.
// The two oscillators step on every clock in which their load input is low.
//
// Interface: clk, rst (async, active high), f, f_fine (PHASE_W bits);
// sin_o, cos_o, sin_mix, cos_mix, tan_o, cot_o (OUT_W bits, signed; tan/cot
// with FRAC fraction bits); tc_valid, tan_inf, cot_inf. Polynomial scheme:
// tp_x in, tp_sin, tp_cos out (DATA_W-1 fraction bits). Recursive
// oscillator: rs_load, rs_coef, rs_y_m1, rs_y_m2 in, rs_y out. Rotating
// oscillator: ro_load, ro_sin_step, ro_cos_step, ro_sin_init, ro_cos_init in,
// ro_sin, ro_cos out. Both oscillators use OUT_W-bit words with OUT_W-2
// fraction bits.
// Timing: sin_o/cos_o lag the phase register by one clock, sin_mix/cos_mix
// lag sin_o/cos_o by one more clock. tp_sin/tp_cos lag tp_x by one clock.
// The oscillators give one sample per clock after load.
module sincos_top #(
  parameter int unsigned PHASE_W = sincos_pkg::PHASE_W,
  parameter int unsigned ADDR_W  = sincos_pkg::ROM_ADDR_W,
  parameter int unsigned DATA_W  = sincos_pkg::ROM_DATA_W,
  parameter int unsigned OUT_W   = sincos_pkg::OUT_W,
  parameter int unsigned FRAC    = sincos_pkg::FRAC_BITS
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [PHASE_W-1:0]      f,
  input  logic [PHASE_W-1:0]      f_fine,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o,
  output logic signed [OUT_W-1:0] sin_mix,
  output logic signed [OUT_W-1:0] cos_mix,
  output logic signed [OUT_W-1:0] tan_o,
  output logic signed [OUT_W-1:0] cot_o,
  output logic                    tc_valid,
  output logic                    tan_inf,
  output logic                    cot_inf,
  // polynomial scheme
  input  logic signed [DATA_W-1:0] tp_x,
  output logic signed [OUT_W-1:0]  tp_sin,
  output logic signed [OUT_W-1:0]  tp_cos,
  // recursive single-frequency oscillator
  input  logic                     rs_load,
  input  logic signed [OUT_W-1:0]  rs_coef,
  input  logic signed [OUT_W-1:0]  rs_y_m1,
  input  logic signed [OUT_W-1:0]  rs_y_m2,
  output logic signed [OUT_W-1:0]  rs_y,
  // rotating multiple-frequency oscillator
  input  logic                     ro_load,
  input  logic signed [OUT_W-1:0]  ro_sin_step,
  input  logic signed [OUT_W-1:0]  ro_cos_step,
  input  logic signed [OUT_W-1:0]  ro_sin_init,
  input  logic signed [OUT_W-1:0]  ro_cos_init,
  output logic signed [OUT_W-1:0]  ro_sin,
  output logic signed [OUT_W-1:0]  ro_cos
);
  logic signed [OUT_W-1:0] sin_fine, cos_fine;
  logic [PHASE_W-1:0]      phase_main, phase_fine;
  logic                    tc_busy;

  sin_gen #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .OUT_W(OUT_W)) u_gen (
    .clk(clk), .rst(rst), .f(f),
    .sin_o(sin_o), .cos_o(cos_o), .phase(phase_main)
  );

  sin_gen #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .OUT_W(OUT_W)) u_fine (
    .clk(clk), .rst(rst), .f(f_fine),
    .sin_o(sin_fine), .cos_o(cos_fine), .phase(phase_fine)
  );

  tan_cot_unit #(.W(OUT_W), .FRAC(FRAC)) u_div (
    .clk(clk), .rst(rst),
    .start(~tc_busy),
    .sin_i(sin_o), .cos_i(cos_o),
    .busy(tc_busy), .valid(tc_valid),
    .tan_o(tan_o), .cot_o(cot_o),
    .tan_inf(tan_inf), .cot_inf(cot_inf)
  );

  combined_mixer #(.IN_W(OUT_W), .SAMPLE_W(DATA_W), .OUT_W(OUT_W)) u_mix (
    .clk(clk), .rst(rst),
    .sin_x(sin_o), .cos_x(cos_o),
    .sin_y(sin_fine), .cos_y(cos_fine),
    .sin_o(sin_mix), .cos_o(cos_mix)
  );

  taylor_sincos #(.X_W(DATA_W), .OUT_W(OUT_W)) u_poly (
    .clk(clk), .rst(rst), .x(tp_x),
    .sin_o(tp_sin), .cos_o(tp_cos)
  );

  resonator_oscillator #(.W(OUT_W)) u_res (
    .clk(clk), .rst(rst), .load(rs_load), .en(1'b1),
    .coef(rs_coef), .y_m1(rs_y_m1), .y_m2(rs_y_m2), .y(rs_y)
  );

  rotation_oscillator #(.W(OUT_W)) u_rot (
    .clk(clk), .rst(rst), .load(ro_load), .en(1'b1),
    .sin_step(ro_sin_step), .cos_step(ro_cos_step),
    .sin_init(ro_sin_init), .cos_init(ro_cos_init),
    .sin_o(ro_sin), .cos_o(ro_cos)
  );
endmodule
