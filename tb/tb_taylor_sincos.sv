// tb_taylor_sincos: sweeps x over [-1, 1) and checks sin_o/cos_o one clock
// later against (a) the same polynomials evaluated in real arithmetic
// (within 4 LSB, the truncation of the fixed-point steps) and (b) the true
// 32768*sin(pi*x/2) and 32768*cos(pi*x/2) (within 0.1 % of full scale, the
// approximation error of the polynomials). The end points x = 0 and x = -1
// (-90 degrees) are included.
module tb_taylor_sincos;
  logic clk = 1'b0;
  logic rst;
  logic signed [15:0] x;
  logic signed [31:0] sin_o, cos_o;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  taylor_sincos dut (.clk(clk), .rst(rst), .x(x), .sin_o(sin_o), .cos_o(cos_o));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic one(input int xi);
    real xr, ps, pc, ts, tc;
    @(negedge clk);
    x = 16'(xi);
    @(negedge clk);
    xr = real'(xi) / 32768.0;
    ps = (1.57063 * xr - 0.64323 * xr ** 3 + 0.07271 * xr ** 5) * 32768.0;
    pc = (0.9994 - 1.22279 * xr ** 2 + 0.22399 * xr ** 4) * 32768.0;
    ts = $sin(3.14159265358979 * xr / 2.0) * 32768.0;
    tc = $cos(3.14159265358979 * xr / 2.0) * 32768.0;
    checks += 4;
    if (absr(real'(sin_o) - ps) > 4.0) begin
      failures++; $display("FAIL x=%0d sin_o=%0d poly %f", xi, sin_o, ps);
    end
    if (absr(real'(cos_o) - pc) > 4.0) begin
      failures++; $display("FAIL x=%0d cos_o=%0d poly %f", xi, cos_o, pc);
    end
    if (absr(real'(sin_o) - ts) > 33.0) begin
      failures++; $display("FAIL x=%0d sin_o=%0d true %f", xi, sin_o, ts);
    end
    if (absr(real'(cos_o) - tc) > 33.0) begin
      failures++; $display("FAIL x=%0d cos_o=%0d true %f", xi, cos_o, tc);
    end
    if (absr(real'(sin_o) - ts) > max_err) max_err = absr(real'(sin_o) - ts);
    if (absr(real'(cos_o) - tc) > max_err) max_err = absr(real'(cos_o) - tc);
  endtask

  initial begin
    rst = 1'b1; x = '0;
    #12 rst = 1'b0;
    checks++;
    if (sin_o !== 0 || cos_o !== 0) begin failures++; $display("FAIL reset"); end
    one(0);
    checks++;
    if (sin_o !== 0) begin failures++; $display("FAIL sin(0)=%0d", sin_o); end
    one(-32768);
    for (int xi = -32768; xi < 32768; xi += 517) one(xi);
    for (int i = 0; i < 200; i++) one(int'($urandom_range(0, 65535)) - 32768);
    $display("largest error against the true functions: %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
