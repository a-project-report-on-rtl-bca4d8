// tb_resonator_oscillator: loads the coefficient 2 cos b and the sine
// initial conditions y(-1) = -sin b, y(-2) = -sin 2b, then the cosine ones
// y(-1) = cos b, y(-2) = cos 2b, and runs the recurrence. Every sample is
// compared with the same recurrence computed here in 64-bit integers (exact
// match) and with the true sin(i*b) or cos(i*b) (within 1e-6 of full
// scale). Holding en low must freeze the output. Two frequencies are run.
module tb_resonator_oscillator;
  localparam int W = 32, F = 30;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0;
  logic rst, load, en;
  logic signed [W-1:0] coef, y_m1, y_m2, y;
  int checks = 0, failures = 0, sine_runs = 0, cosine_runs = 0;

  resonator_oscillator dut (.clk(clk), .rst(rst), .load(load), .en(en),
    .coef(coef), .y_m1(y_m1), .y_m2(y_m2), .y(y));

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

  task automatic run(input real b, input bit cosine, input int n);
    longint k, m1, m2, nxt;
    real truth, err;
    k  = fx(2.0 * $cos(b));
    m1 = cosine ? fx($cos(b))       : -fx($sin(b));
    m2 = cosine ? fx($cos(2.0 * b)) : -fx($sin(2.0 * b));
    @(negedge clk);
    coef = W'(k); y_m1 = W'(m1); y_m2 = W'(m2); load = 1'b1; en = 1'b1;
    @(negedge clk);
    load = 1'b0;
    checks++;
    if (longint'(y) !== m1) begin failures++; $display("FAIL load y=%0d", y); end
    for (int i = 0; i < n; i++) begin
      if (i % 37 == 36) begin   // an idle clock before this step
        en = 1'b0;
        @(negedge clk);
        checks++;
        if (longint'(y) !== m1) begin failures++; $display("FAIL output moved while en low"); end
        en = 1'b1;
      end
      @(negedge clk);
      nxt = ((k * m1) >>> F) - m2;
      m2 = m1; m1 = nxt;
      truth = (cosine ? $cos(b * i) : $sin(b * i)) * (2.0 ** F);
      err = real'(y) - truth;
      if (err < 0.0) err = -err;
      checks += 2;
      if (longint'(y) !== nxt) begin
        failures++; $display("FAIL i=%0d y=%0d model %0d", i, y, nxt);
      end
      if (err > 1.0e-6 * (2.0 ** F)) begin
        failures++; $display("FAIL i=%0d y=%0d true %f", i, y, truth);
      end
    end
    if (cosine) cosine_runs++; else sine_runs++;
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; en = 1'b0; coef = '0; y_m1 = '0; y_m2 = '0;
    #12 rst = 1'b0;
    run(2.0 * PI / 50.0, 1'b0, 300);
    run(2.0 * PI / 50.0, 1'b1, 300);
    run(2.0 * PI / 9.0, 1'b0, 200);
    run(2.0 * PI / 9.0, 1'b1, 200);
    $display("sine_runs=%0d cosine_runs=%0d", sine_runs, cosine_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
