// resonator_oscillator: single-frequency oscillator built on the difference
// equation y(i) = 2 cos(b) y(i-1) - y(i-2).
//
// This is a second-order recursive filter placed exactly on the edge
// between growth and decay, so it rings at f = b * fclk / (2*pi).
// The initial conditions select the wave:
//   y(-1) = -sin b, y(-2) = -sin 2b   gives a sine;
//   y(-1) =  cos b, y(-2) =  cos 2b   gives a cosine.
// A new frequency needs a new coefficient and new initial values, all
// supplied by the user. The recurrence and its initial conditions follow the
// published scheme. These are this design's choices:
//   * the coefficient 2 cos b is a signed W-bit number with F fraction bits;
//   * samples use the same F fraction bits;
//   * the product is truncated by an arithmetic shift.
// As the scheme warns, the coefficients must be rounded so that y(0) comes
// out as 0 for a sine, and very low or very high frequencies lose accuracy.
//
// Interface: load captures coef, y_m1 = y(-1) and y_m2 = y(-2); while en is
// high and load is low, one new sample is computed per clock. y is the
// newest sample; after load it reads y(-1) until the first step.
// Timing: y(i) appears i+1 enabled clocks after load.
module resonator_oscillator #(
  parameter int unsigned W = sincos_pkg::OUT_W,
  parameter int unsigned F = W - 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,
  input  logic                en,
  input  logic signed [W-1:0] coef,
  input  logic signed [W-1:0] y_m1,
  input  logic signed [W-1:0] y_m2,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0]   k_q;   // 2 cos b
  logic signed [W-1:0]   y1_q;  // y(i-1)
  logic signed [W-1:0]   y2_q;  // y(i-2)
  logic signed [2*W-1:0] prod;
  logic signed [2*W-1:0] prod_s;
  logic signed [W-1:0]   y_next;

  assign prod   = k_q * y1_q;
  assign prod_s = prod >>> F;
  assign y_next = W'(prod_s) - y2_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      k_q  <= '0;
      y1_q <= '0;
      y2_q <= '0;
    end else if (load) begin
      k_q  <= coef;
      y1_q <= y_m1;
      y2_q <= y_m2;
    end else if (en) begin
      y2_q <= y1_q;
      y1_q <= y_next;
    end
  end

  assign y = y1_q;
endmodule
