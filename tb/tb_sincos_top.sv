// tb_sincos_top: end-to-end test of the whole design at its default sizes
// (32-bit phase, 16 x 16-bit tables, 32-bit outputs, 16 fraction bits).
//
// A software model keeps both phase accumulators and predicts, clock by
// clock, the main outputs sin_o/cos_o (one clock after the phase), the
// combined-scheme outputs sin_mix/cos_mix (one clock after that), and, at
// every tc_valid pulse, tan_o/cot_o for the sample pair the divider unit
// captured when it last restarted. Run 1 steps the main generator by one
// table sample per clock and the fine one by a quarter sample, so that the
// divider restarts (every 49 clocks) land on every sample, including those
// where cos = 0 and sin = 0. Run 2 uses random frequency words.
// The polynomial scheme gets a new random angle every clock and is checked
// against the polynomials in real arithmetic. The recursive oscillator is
// loaded with sine and later with cosine initial conditions, the rotating
// oscillator with two different steps. Both are checked every clock against
// their recurrences in 64-bit integers.
// Each mechanism (sine and cosine negation, phase wrap in both generators,
// divider refresh, undefined tan and cot, non-trivial mixing, each
// oscillator load) is counted and must happen at least once.
module tb_sincos_top;
  import tb_ref_pkg::*;
  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] f, f_fine;
  logic signed [31:0] sin_o, cos_o, sin_mix, cos_mix, tan_o, cot_o;
  logic        tc_valid, tan_inf, cot_inf;
  logic signed [15:0] tp_x;
  logic signed [31:0] tp_sin, tp_cos;
  logic        rs_load, ro_load;
  logic signed [31:0] rs_coef, rs_y_m1, rs_y_m2, rs_y;
  logic signed [31:0] ro_sin_step, ro_cos_step, ro_sin_init, ro_cos_init, ro_sin, ro_cos;
  int n_poly = 0, n_rs_sine = 0, n_rs_cos = 0, n_ro_load = 0;
  longint rk, rm1, rm2, osy, ocy, os, oc;
  localparam real PI = 3.14159265358979;

  int checks = 0, failures = 0;
  int n_sin_neg = 0, n_cos_neg = 0, n_wrap = 0, n_wrap_fine = 0;
  int n_refresh = 0, n_tan_inf = 0, n_cot_inf = 0, n_mix_shift = 0;

  logic [31:0] pm, pf;                     // model phases (RgP of each generator)
  int exp_s, exp_c, exp_fs, exp_fc;        // model generator outputs
  longint exp_ms, exp_mc;                  // model mixer outputs
  int last_s, last_c, pend_s, pend_c;
  bit have_pend;

  sincos_top dut (
    .clk(clk), .rst(rst), .f(f), .f_fine(f_fine),
    .sin_o(sin_o), .cos_o(cos_o), .sin_mix(sin_mix), .cos_mix(cos_mix),
    .tan_o(tan_o), .cot_o(cot_o), .tc_valid(tc_valid),
    .tan_inf(tan_inf), .cot_inf(cot_inf),
    .tp_x(tp_x), .tp_sin(tp_sin), .tp_cos(tp_cos),
    .rs_load(rs_load), .rs_coef(rs_coef), .rs_y_m1(rs_y_m1), .rs_y_m2(rs_y_m2), .rs_y(rs_y),
    .ro_load(ro_load), .ro_sin_step(ro_sin_step), .ro_cos_step(ro_cos_step),
    .ro_sin_init(ro_sin_init), .ro_cos_init(ro_cos_init), .ro_sin(ro_sin), .ro_cos(ro_cos));

  function automatic longint fx(input real v);
    return longint'(v * (2.0 ** 30));
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  // load the recursive oscillator for step angle b (sine or cosine wave)
  task automatic rs_setup(input real b, input bit cosine);
    rs_load = 1'b1;
    rs_coef = 32'(fx(2.0 * $cos(b)));
    rs_y_m1 = cosine ? 32'(fx($cos(b)))       : -32'(fx($sin(b)));
    rs_y_m2 = cosine ? 32'(fx($cos(2.0 * b))) : -32'(fx($sin(2.0 * b)));
    if (cosine) n_rs_cos++; else n_rs_sine++;
  endtask

  // load the rotating oscillator with start angle x0 and step y
  task automatic ro_setup(input real x0, input real y);
    ro_load = 1'b1;
    ro_sin_step = 32'(fx($sin(y)));  ro_cos_step = 32'(fx($cos(y)));
    ro_sin_init = 32'(fx($sin(x0))); ro_cos_init = 32'(fx($cos(x0)));
    n_ro_load++;
  endtask

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // advance the model by one clock edge and compare at the following negedge
  task automatic step();
    longint nms, nmc;
    bit it, ic;
    longint et, ec;
    // mixer registers what the generators show before this edge
    nms = (longint'(exp_s) * exp_fc + longint'(exp_c) * exp_fs) >>> 15;
    nmc = (longint'(exp_c) * exp_fc - longint'(exp_s) * exp_fs) >>> 15;
    exp_ms = nms; exp_mc = nmc;
    exp_s  = ref_sin(int'(pm[31:27]));
    exp_c  = ref_cos(int'(pm[31:27]));
    exp_fs = ref_sin(int'(pf[31:27]));
    exp_fc = ref_cos(int'(pf[31:27]));
    if ({1'b0, pm} + {1'b0, f} > 33'h0_FFFF_FFFF) n_wrap++;
    if ({1'b0, pf} + {1'b0, f_fine} > 33'h0_FFFF_FFFF) n_wrap_fine++;
    pm = pm + f;
    pf = pf + f_fine;
    // oscillator models for this edge
    if (rs_load) begin
      rk = rs_coef; rm1 = rs_y_m1; rm2 = rs_y_m2;
    end else begin
      longint nx;
      nx = ((rk * rm1) >>> 30) - rm2;
      rm2 = rm1; rm1 = nx;
    end
    if (ro_load) begin
      osy = ro_sin_step; ocy = ro_cos_step; os = ro_sin_init; oc = ro_cos_init;
    end else begin
      longint ns, nc;
      ns = (os * ocy + oc * osy) >>> 30;
      nc = (oc * ocy - os * osy) >>> 30;
      os = ns; oc = nc;
    end
    @(negedge clk);
    rs_load = 1'b0;
    ro_load = 1'b0;
    begin
      real xr, ps, pc;
      xr = real'(tp_x) / 32768.0;
      ps = (1.57063 * xr - 0.64323 * xr ** 3 + 0.07271 * xr ** 5) * 32768.0;
      pc = (0.9994 - 1.22279 * xr ** 2 + 0.22399 * xr ** 4) * 32768.0;
      checks += 4;
      if (absr(real'(tp_sin) - ps) > 4.0 || absr(real'(tp_cos) - pc) > 4.0) begin
        failures++;
        $display("FAIL polynomial x=%0d sin=%0d cos=%0d expected %f %f", tp_x, tp_sin, tp_cos, ps, pc);
      end
      n_poly++;
      tp_x = 16'($urandom);
      if (longint'(rs_y) !== rm1) begin
        failures++;
        $display("FAIL recursive oscillator y=%0d expected %0d", rs_y, rm1);
      end
      if (longint'(ro_sin) !== os || longint'(ro_cos) !== oc) begin
        failures++;
        $display("FAIL rotating oscillator %0d %0d expected %0d %0d", ro_sin, ro_cos, os, oc);
      end
    end
    checks += 4;
    if (int'(sin_o) !== exp_s || int'(cos_o) !== exp_c) begin
      failures++;
      $display("FAIL sin_o=%0d cos_o=%0d expected %0d %0d", sin_o, cos_o, exp_s, exp_c);
    end
    if (longint'(sin_mix) !== exp_ms || longint'(cos_mix) !== exp_mc) begin
      failures++;
      $display("FAIL sin_mix=%0d cos_mix=%0d expected %0d %0d", sin_mix, cos_mix, exp_ms, exp_mc);
    end
    if (exp_fs !== 0 && exp_ms !== 0) n_mix_shift++;
    if (sin_o < 0) n_sin_neg++;
    if (cos_o < 0) n_cos_neg++;
    if (tc_valid) begin
      n_refresh++;
      if (have_pend) begin
        et = ref_ratio(pend_s, pend_c, it);
        ec = ref_ratio(pend_c, pend_s, ic);
        checks += 2;
        if (longint'(tan_o) !== et || tan_inf !== it) begin
          failures++;
          $display("FAIL tan(%0d/%0d)=%0d inf=%0b expected %0d", pend_s, pend_c, tan_o, tan_inf, et);
        end
        if (longint'(cot_o) !== ec || cot_inf !== ic) begin
          failures++;
          $display("FAIL cot(%0d/%0d)=%0d inf=%0b expected %0d", pend_c, pend_s, cot_o, cot_inf, ec);
        end
        if (tan_inf) n_tan_inf++;
        if (cot_inf) n_cot_inf++;
      end
      // the unit restarted at the edge that raised tc_valid, capturing the
      // sample pair shown before that edge
      pend_s = last_s; pend_c = last_c; have_pend = 1'b1;
    end
    last_s = int'(sin_o);
    last_c = int'(cos_o);
  endtask

  task automatic expect_seen(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end
  endtask

  initial begin
    rst = 1'b1; f = '0; f_fine = '0;
    tp_x = '0;
    rs_load = 1'b0; rs_coef = '0; rs_y_m1 = '0; rs_y_m2 = '0;
    ro_load = 1'b0; ro_sin_step = '0; ro_cos_step = '0; ro_sin_init = '0; ro_cos_init = '0;
    rk = 0; rm1 = 0; rm2 = 0; osy = 0; ocy = 0; os = 0; oc = 0;
    pm = '0; pf = '0;
    exp_s = 0; exp_c = 0; exp_fs = 0; exp_fc = 0;
    last_s = 0; last_c = 0; have_pend = 1'b0;
    #12;
    checks++;
    if (sin_o !== 0 || cos_o !== 0 || sin_mix !== 0 || tc_valid !== 0) begin
      failures++; $display("FAIL reset values");
    end
    @(negedge clk);
    rst    = 1'b0;
    f      = 32'h0800_0000;   // one table sample per clock
    f_fine = 32'h0200_0000;   // a quarter sample per clock
    rs_setup(2.0 * PI / 40.0, 1'b0);
    ro_setup(0.0, 2.0 * PI / 64.0);
    repeat (1700) step();
    rs_setup(2.0 * PI / 25.0, 1'b1);
    ro_setup(PI / 5.0, -2.0 * PI / 11.0);
    f      = $urandom;
    f_fine = $urandom >> 6;
    repeat (500) step();
    f      = 32'h0123_4567;
    f_fine = 32'hFFF0_0000;   // fine generator running backwards
    repeat (500) step();
    expect_seen("sine negative half wave", n_sin_neg);
    expect_seen("cosine negative half wave", n_cos_neg);
    expect_seen("main phase wrap", n_wrap);
    expect_seen("fine phase wrap", n_wrap_fine);
    expect_seen("tan/cot refresh", n_refresh);
    expect_seen("tan undefined (cos = 0)", n_tan_inf);
    expect_seen("cot undefined (sin = 0)", n_cot_inf);
    expect_seen("mixing with non-zero fine sine", n_mix_shift);
    expect_seen("polynomial evaluation", n_poly);
    expect_seen("recursive oscillator, sine start", n_rs_sine);
    expect_seen("recursive oscillator, cosine start", n_rs_cos);
    expect_seen("rotating oscillator reload", n_ro_load - 1);
    $display("poly=%0d rs_sine=%0d rs_cos=%0d ro_loads=%0d", n_poly, n_rs_sine, n_rs_cos, n_ro_load);
    $display("sin_neg=%0d cos_neg=%0d wrap=%0d wrap_fine=%0d refresh=%0d tan_inf=%0d cot_inf=%0d mix=%0d",
             n_sin_neg, n_cos_neg, n_wrap, n_wrap_fine, n_refresh, n_tan_inf, n_cot_inf, n_mix_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
