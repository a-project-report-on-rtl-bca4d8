// sign_adder_reg: a sign adder (SMS or SMC) with its output register (RgS or
// RgC).
//
// One adder input is tied to zero and the other is the unsigned table
// sample u, zero-extended to OUT_W bits. With negate = 0 the adder passes
// 0 + u, with negate = 1 it forms 0 - u, which produces the negative half of
// the wave. The two's complement result is registered. This structure
// follows the published circuit; the asynchronous active-high clear is this
// design's choice.
//
// Interface: clk, rst, negate, u (IN_W bits), y (OUT_W bits, signed).
// Timing: y shows the result one clock after negate/u are applied.
module sign_adder_reg #(
  parameter int unsigned IN_W  = sincos_pkg::ROM_DATA_W,
  parameter int unsigned OUT_W = sincos_pkg::OUT_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    negate,
  input  logic [IN_W-1:0]         u,
  output logic signed [OUT_W-1:0] y
);
  logic signed [OUT_W-1:0] u_ext;
  logic signed [OUT_W-1:0] sum;

  assign u_ext = signed'({{(OUT_W - IN_W){1'b0}}, u});
  assign sum   = negate ? ('0 - u_ext) : ('0 + u_ext);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) y <= '0;
    else     y <= sum;
  end
endmodule
