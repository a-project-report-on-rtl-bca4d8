// taylor_sincos: polynomial sine and cosine (the "sine function calculation"
// scheme).
//
// For |x| < 1 it evaluates the fitted odd/even polynomials
//   sin(pi*x/2) = 1.57063 x - 0.64323 x^3 + 0.07271 x^5
//   cos(pi*x/2) = 0.9994 - 1.22279 x^2 + 0.22399 x^4
// whose error is about 0.06 % of full scale. Horner form is used:
//   x2  = x*x
//   sin = x * (C1 + x2 * (-C3 + x2 * C5))
//   cos =       C0 + x2 * (-C2 + x2 * C4)
// which takes the six multiplications the scheme is known for.
//
// The polynomials and their coefficients follow the published scheme. The
// number formats are this design's choice:
//   * x is a signed X_W-bit fraction, x = X / 2**(X_W-1), so X = -2**(X_W-1)
//     is an angle of -90 degrees;
//   * coefficients are rounded to CF fraction bits;
//   * every product is truncated (arithmetic shift);
//   * results have X_W-1 fraction bits, so 1.0 reads as 2**(X_W-1), and are
//     sign-extended to OUT_W bits.
// The whole evaluation is combinational and is followed by one output
// register.
//
// Interface: clk, rst (async, active high), x in; sin_o, cos_o out.
// Timing: sin_o/cos_o show the result for x one clock after x is applied.
module taylor_sincos #(
  parameter int unsigned X_W   = sincos_pkg::ROM_DATA_W,
  parameter int unsigned CF    = 16,
  parameter int unsigned OUT_W = sincos_pkg::OUT_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [X_W-1:0]   x,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o
);
  localparam int unsigned XF = X_W - 1;          // fraction bits of x
  localparam int unsigned AW = 2 * X_W + CF + 4; // working width

  typedef logic signed [AW-1:0] acc_t;

  localparam acc_t C1 = acc_t'(1.57063 * (2.0 ** CF));
  localparam acc_t C3 = acc_t'(0.64323 * (2.0 ** CF));
  localparam acc_t C5 = acc_t'(0.07271 * (2.0 ** CF));
  localparam acc_t C0 = acc_t'(0.9994  * (2.0 ** CF));
  localparam acc_t C2 = acc_t'(1.22279 * (2.0 ** CF));
  localparam acc_t C4 = acc_t'(0.22399 * (2.0 ** CF));

  acc_t xw, x2;          // x and x^2, XF fraction bits
  acc_t s_a, s_b, s_c;   // sine Horner steps, CF fraction bits
  acc_t c_a, c_b;        // cosine Horner steps, CF fraction bits
  acc_t s_res, c_res;    // results, XF fraction bits

  always_comb begin
    xw    = acc_t'(x);
    x2    = (xw * xw) >>> XF;
    s_a   = ((x2 * C5) >>> XF) - C3;
    s_b   = ((x2 * s_a) >>> XF) + C1;
    s_c   = (xw * s_b) >>> CF;
    s_res = s_c;
    c_a   = ((x2 * C4) >>> XF) - C2;
    c_b   = ((x2 * c_a) >>> XF) + C0;
    c_res = c_b >>> (CF - XF);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sin_o <= '0;
      cos_o <= '0;
    end else begin
      sin_o <= OUT_W'(s_res);
      cos_o <= OUT_W'(c_res);
    end
  end
endmodule
