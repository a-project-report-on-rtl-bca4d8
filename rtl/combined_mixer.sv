// combined_mixer: mixes two sine/cosine generators into one (combined scheme).
//
// A coarse generator supplies sin x, cos x and a fine generator supplies
// sin y, cos y. The angle-sum identities
//   sin(x+y) = sin x * cos y + cos x * sin y
//   cos(x+y) = cos x * cos y - sin x * sin y
// give a wave whose phase step is the sum of the two generators' steps, so
// the fine generator tunes the coarse frequency. Mixing with these two
// identities follows the published combined scheme; the number formats and
// the pipeline are this design's choices: inputs are signed samples with
// amplitude 2**(SAMPLE_W-1)-1 of which only the low SAMPLE_W bits are used
// (the rest are sign copies), the two products are summed at full width and
// shifted right arithmetically by SAMPLE_W-1 bits, and the result is
// sign-extended to OUT_W bits.
//
// Interface: sin_x, cos_x, sin_y, cos_y in; sin_o, cos_o out (signed).
// Timing: one register stage, outputs follow inputs by one clock.
module combined_mixer #(
  parameter int unsigned IN_W     = sincos_pkg::OUT_W,
  parameter int unsigned SAMPLE_W = sincos_pkg::ROM_DATA_W,
  parameter int unsigned OUT_W    = sincos_pkg::OUT_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  sin_x,
  input  logic signed [IN_W-1:0]  cos_x,
  input  logic signed [IN_W-1:0]  sin_y,
  input  logic signed [IN_W-1:0]  cos_y,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o
);
  localparam int unsigned PW = 2 * SAMPLE_W + 1; // sum of two products

  logic signed [SAMPLE_W-1:0]   sx, cx, sy, cy;
  logic signed [2*SAMPLE_W-1:0] sxcy, cxsy, cxcy, sxsy;
  logic signed [PW-1:0]       sin_sum, cos_sum;
  logic signed [PW-1:0]       sin_scaled, cos_scaled;

  assign sx = sin_x[SAMPLE_W-1:0];
  assign cx = cos_x[SAMPLE_W-1:0];
  assign sy = sin_y[SAMPLE_W-1:0];
  assign cy = cos_y[SAMPLE_W-1:0];

  assign sxcy = sx * cy;
  assign cxsy = cx * sy;
  assign cxcy = cx * cy;
  assign sxsy = sx * sy;

  assign sin_sum    = PW'(sxcy) + PW'(cxsy);
  assign cos_sum    = PW'(cxcy) - PW'(sxsy);
  assign sin_scaled = sin_sum >>> (SAMPLE_W - 1);
  assign cos_scaled = cos_sum >>> (SAMPLE_W - 1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sin_o <= '0;
      cos_o <= '0;
    end else begin
      sin_o <= OUT_W'(sin_scaled);
      cos_o <= OUT_W'(cos_scaled);
    end
  end
endmodule
