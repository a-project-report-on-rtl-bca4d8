// rotation_oscillator: multiple-frequency oscillator built on the
// angle-sum identities.
//
// Every clock the sample pair (sin x, cos x) is rotated by the step angle y:
//   sin(x+y) = sin x cos y + cos x sin y
//   cos(x+y) = cos x cos y - sin x sin y
// The step, given as sin y and cos y, sets the frequency
// f = y * fclk / (2*pi), and any step can be applied without new initial
// values. The recurrence follows the published scheme. These are this
// design's choices:
//   * all values are signed W-bit numbers with F fraction bits;
//   * products are truncated.
// The scheme's known weakness is kept as is: rounding makes
// sin^2 + cos^2 drift away from 1 over time. The non-linear amplitude
// correction that is said to reduce it is not specified, so none is applied.
//
// Interface: load captures the start pair (sin_init, cos_init) and the step
// (sin_step, cos_step); while en is high and load is low, the pair advances
// by one step per clock. sin_o/cos_o are the current pair.
// Timing: after load, the pair for x0 + i*y appears after i enabled clocks.
module rotation_oscillator #(
  parameter int unsigned W = sincos_pkg::OUT_W,
  parameter int unsigned F = W - 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,
  input  logic                en,
  input  logic signed [W-1:0] sin_step,
  input  logic signed [W-1:0] cos_step,
  input  logic signed [W-1:0] sin_init,
  input  logic signed [W-1:0] cos_init,
  output logic signed [W-1:0] sin_o,
  output logic signed [W-1:0] cos_o
);
  logic signed [W-1:0]   sy_q, cy_q;
  logic signed [2*W-1:0] p_sc, p_cs, p_cc, p_ss;
  logic signed [2*W-1:0] s_sum, c_sum;
  logic signed [2*W-1:0] s_sh, c_sh;

  assign p_sc  = sin_o * cy_q;
  assign p_cs  = cos_o * sy_q;
  assign p_cc  = cos_o * cy_q;
  assign p_ss  = sin_o * sy_q;
  assign s_sum = p_sc + p_cs;
  assign c_sum = p_cc - p_ss;
  assign s_sh  = s_sum >>> F;
  assign c_sh  = c_sum >>> F;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sy_q  <= '0;
      cy_q  <= '0;
      sin_o <= '0;
      cos_o <= '0;
    end else if (load) begin
      sy_q  <= sin_step;
      cy_q  <= cos_step;
      sin_o <= sin_init;
      cos_o <= cos_init;
    end else if (en) begin
      sin_o <= W'(s_sh);
      cos_o <= W'(c_sh);
    end
  end
endmodule
