// tb_rotation_oscillator: loads a start angle and a step angle, runs the
// rotation recurrence and compares every pair with the same recurrence in
// 64-bit integers (exact match) and with the true sin/cos of x0 + i*y
// (within 1e-6 of full scale). Also checks that en low freezes the pair and
// that a new step can be loaded without new start values being needed.
module tb_rotation_oscillator;
  localparam int W = 32, F = 30;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0;
  logic rst, load, en;
  logic signed [W-1:0] sin_step, cos_step, sin_init, cos_init, sin_o, cos_o;
  int checks = 0, failures = 0;

  rotation_oscillator dut (.clk(clk), .rst(rst), .load(load), .en(en),
    .sin_step(sin_step), .cos_step(cos_step), .sin_init(sin_init), .cos_init(cos_init),
    .sin_o(sin_o), .cos_o(cos_o));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fx(input real v);
    return longint'(v * (2.0 ** F));
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic run(input real x0, input real y, input int n);
    longint sy, cy, s, c, ns, nc;
    sy = fx($sin(y)); cy = fx($cos(y));
    s  = fx($sin(x0)); c = fx($cos(x0));
    @(negedge clk);
    sin_step = W'(sy); cos_step = W'(cy); sin_init = W'(s); cos_init = W'(c);
    load = 1'b1; en = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int i = 1; i <= n; i++) begin
      if (i % 29 == 0) begin    // an idle clock before this step
        en = 1'b0;
        @(negedge clk);
        checks++;
        if (longint'(sin_o) !== s || longint'(cos_o) !== c) begin
          failures++; $display("FAIL pair moved while en low");
        end
        en = 1'b1;
      end
      @(negedge clk);
      checks += 2;
      ns = (s * cy + c * sy) >>> F;
      nc = (c * cy - s * sy) >>> F;
      s = ns; c = nc;
      if (longint'(sin_o) !== s || longint'(cos_o) !== c) begin
        failures++; $display("FAIL i=%0d pair %0d %0d model %0d %0d", i, sin_o, cos_o, s, c);
      end
      if (absr(real'(sin_o) - $sin(x0 + i * y) * (2.0 ** F)) > 1.0e-6 * (2.0 ** F) ||
          absr(real'(cos_o) - $cos(x0 + i * y) * (2.0 ** F)) > 1.0e-6 * (2.0 ** F)) begin
        failures++; $display("FAIL i=%0d pair %0d %0d far from the true values", i, sin_o, cos_o);
      end
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; en = 1'b0;
    sin_step = '0; cos_step = '0; sin_init = '0; cos_init = '0;
    #12 rst = 1'b0;
    checks++;
    if (sin_o !== 0 || cos_o !== 0) begin failures++; $display("FAIL reset"); end
    run(0.0, 2.0 * PI / 64.0, 300);
    run(PI / 3.0, -2.0 * PI / 17.0, 200);
    run(-1.0, 0.001, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
