// tan_cot_unit: tangent and cotangent from a sine/cosine sample pair.
//
// The sine and cosine registers of the generator are divided by each other:
// tan = sin / cos and cot = cos / sin. Two restoring dividers run side by
// side, one per result. Each divides magnitudes: the numerator magnitude is
// shifted left by FRAC bits first, so the quotient is a fixed-point number
// with FRAC fraction bits, and the quotient is negated when the two input
// signs differ. The dividers are W+FRAC bits wide so that the shifted
// numerator never overflows. Results that do not fit in W signed bits, and
// division by zero, saturate to +/-(2**(W-1)-1); a zero divisor also raises
// tan_inf / cot_inf. Dividing the two generator registers follows the
// published design; the fixed-point format, saturation, the flags and the
// start/valid handshake are this design's choices.
//
// Interface: start (accepted when busy is low) captures sin_i and cos_i;
// busy is high while the dividers iterate; valid pulses for one clock when
// tan_o, cot_o, tan_inf and cot_inf are updated (they hold until the next
// valid).
// Timing: valid rises W+FRAC+1 clocks after the edge that accepted start.
module tan_cot_unit #(
  parameter int unsigned W    = sincos_pkg::OUT_W,
  parameter int unsigned FRAC = sincos_pkg::FRAC_BITS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] sin_i,
  input  logic signed [W-1:0] cos_i,
  output logic                busy,
  output logic                valid,
  output logic signed [W-1:0] tan_o,
  output logic signed [W-1:0] cot_o,
  output logic                tan_inf,
  output logic                cot_inf
);
  localparam int unsigned DW = W + FRAC;
  localparam logic [DW-1:0] MAX_POS = DW'((64'd1 << (W - 1)) - 64'd1);

  logic [W-1:0]  sin_mag, cos_mag;
  logic [DW-1:0] sin_num, cos_num, sin_den, cos_den;
  logic          accept;
  logic          neg_q;       // result sign, captured at start
  logic          busy_t, busy_c, done_t, done_c, dbz_t, dbz_c;
  logic [DW-1:0] quo_t, quo_c, rem_t, rem_c;

  assign sin_mag = sin_i[W-1] ? W'(-sin_i) : W'(sin_i);
  assign cos_mag = cos_i[W-1] ? W'(-cos_i) : W'(cos_i);
  assign sin_num = {sin_mag, {FRAC{1'b0}}};
  assign cos_num = {cos_mag, {FRAC{1'b0}}};
  assign sin_den = DW'(sin_mag);
  assign cos_den = DW'(cos_mag);

  assign busy   = busy_t | busy_c;
  assign accept = start & ~busy;

  restoring_divider #(.N(DW)) u_div_tan (
    .clk(clk), .rst(rst), .start(accept),
    .dividend(sin_num), .divisor(cos_den),
    .busy(busy_t), .done(done_t),
    .quotient(quo_t), .remainder(rem_t), .div_by_zero(dbz_t)
  );

  restoring_divider #(.N(DW)) u_div_cot (
    .clk(clk), .rst(rst), .start(accept),
    .dividend(cos_num), .divisor(sin_den),
    .busy(busy_c), .done(done_c),
    .quotient(quo_c), .remainder(rem_c), .div_by_zero(dbz_c)
  );

  // Saturate an unsigned quotient to W signed bits and apply the sign.
  function automatic logic signed [W-1:0] signed_sat(input logic [DW-1:0] q,
                                                     input logic dbz,
                                                     input logic neg);
    logic [DW-1:0] mag;
    mag = (dbz || q > MAX_POS) ? MAX_POS : q;
    return neg ? -signed'(W'(mag)) : signed'(W'(mag));
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      neg_q   <= 1'b0;
      valid   <= 1'b0;
      tan_o   <= '0;
      cot_o   <= '0;
      tan_inf <= 1'b0;
      cot_inf <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (done_t && done_c) begin
        tan_o   <= signed_sat(quo_t, dbz_t, neg_q);
        cot_o   <= signed_sat(quo_c, dbz_c, neg_q);
        tan_inf <= dbz_t;
        cot_inf <= dbz_c;
        valid   <= 1'b1;
      end
      if (accept) neg_q <= sin_i[W-1] ^ cos_i[W-1];
    end
  end

  // Both dividers start together and take the same number of clocks.
  a_lockstep: assert property (@(posedge clk) done_t == done_c);
endmodule
