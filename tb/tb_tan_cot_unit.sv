// tb_tan_cot_unit: feeds every sample pair of a 32-sample sine period (and
// some random pairs) to the tan/cot unit and compares tan_o and cot_o with
// trunc(|num| * 2**16 / |den|), signed and saturated, computed here in
// 64-bit integer arithmetic. Checks the valid latency (W+FRAC+1 = 49
// clocks), the undefined-result flags at sin = 0 and cos = 0, saturation and
// both result signs.
module tb_tan_cot_unit;
  import tb_ref_pkg::*;
  localparam int W = 32, FRAC = 16;
  localparam longint MAXP = (64'sd1 <<< (W - 1)) - 1;
  logic         clk = 1'b0;
  logic         rst;
  logic         start;
  logic signed [W-1:0] sin_i, cos_i, tan_o, cot_o;
  logic         busy, valid, tan_inf, cot_inf;
  int checks = 0, failures = 0;
  int n_tan_inf = 0, n_cot_inf = 0, n_sat = 0, n_neg = 0, n_pos = 0;

  tan_cot_unit dut (
    .clk(clk), .rst(rst), .start(start), .sin_i(sin_i), .cos_i(cos_i),
    .busy(busy), .valid(valid), .tan_o(tan_o), .cot_o(cot_o),
    .tan_inf(tan_inf), .cot_inf(cot_inf));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_q(input longint num, input longint den, output bit inf);
    longint an, ad, q;
    an  = num < 0 ? -num : num;
    ad  = den < 0 ? -den : den;
    inf = (ad == 0);
    q   = inf ? MAXP : (an <<< FRAC) / ad;
    if (q > MAXP) q = MAXP;
    return ((num < 0) !== (den < 0)) ? -q : q;
  endfunction

  task automatic one(input int s, input int c);
    int cycles;
    longint et, ec;
    bit it, ic;
    @(negedge clk);
    sin_i = s; cos_i = c; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sin_i = $urandom; cos_i = $urandom; // inputs are captured; scramble them
    cycles = 0;
    while (!valid) begin @(negedge clk); cycles++; end
    et = expect_q(s, c, it);
    ec = expect_q(c, s, ic);
    checks += 3;
    if (cycles !== W + FRAC + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, W + FRAC + 1);
    end
    if (longint'(tan_o) !== et || tan_inf !== it) begin
      failures++;
      $display("FAIL tan(%0d/%0d)=%0d inf=%0b expected %0d inf=%0b", s, c, tan_o, tan_inf, et, it);
    end
    if (longint'(cot_o) !== ec || cot_inf !== ic) begin
      failures++;
      $display("FAIL cot(%0d/%0d)=%0d inf=%0b expected %0d inf=%0b", c, s, cot_o, cot_inf, ec, ic);
    end
    if (tan_inf) n_tan_inf++;
    if (cot_inf) n_cot_inf++;
    if (!tan_inf && (longint'(tan_o) == MAXP || longint'(tan_o) == -MAXP)) n_sat++;
    if (tan_o < 0) n_neg++;
    if (tan_o > 0) n_pos++;
  endtask

  initial begin
    real t;
    rst = 1'b1; start = 1'b0; sin_i = '0; cos_i = '0;
    #12 rst = 1'b0;
    for (int k = 0; k < 32; k++) one(ref_sin(k), ref_cos(k));
    // tan(pi/4) must be close to 1.0 = 65536
    one(23170, 23170);
    checks++;
    if (tan_o !== 65536) begin failures++; $display("FAIL tan(pi/4)=%0d", tan_o); end
    // check against real tangent for sample 3 (67.5 degrees from cos axis)
    one(ref_sin(3), ref_cos(3));
    t = $tan(3.14159265358979 * 3 / 16.0) * 65536.0;
    checks++;
    if (real'(tan_o) < t * 0.999 || real'(tan_o) > t * 1.001) begin
      failures++; $display("FAIL tan(3pi/16)=%0d real %f", tan_o, t);
    end
    one(2000000000, 1);          // saturation
    one(-2000000000, 3);
    for (int i = 0; i < 100; i++)
      one(int'($urandom_range(0, 65534)) - 32767, int'($urandom_range(0, 65534)) - 32767);
    checks++;
    if (n_tan_inf == 0 || n_cot_inf == 0 || n_sat == 0 || n_neg == 0 || n_pos == 0) begin
      failures++;
      $display("FAIL a case was never exercised");
    end
    $display("tan_inf=%0d cot_inf=%0d saturated=%0d negative=%0d positive=%0d",
             n_tan_inf, n_cot_inf, n_sat, n_neg, n_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
