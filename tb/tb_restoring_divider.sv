// tb_restoring_divider: 32-bit divisions (corner cases and random operands)
// checked against the / and % operators. For each division it also checks
// that done rises exactly N clocks after the edge that accepted start, that
// a start pulse while busy is ignored, and the divide-by-zero flag.
module tb_restoring_divider;
  localparam int N = 32;
  logic         clk = 1'b0;
  logic         rst;
  logic         start;
  logic [N-1:0] dividend, divisor;
  logic         busy, done, dbz;
  logic [N-1:0] quotient, remainder;
  int checks = 0, failures = 0, ignored_starts = 0, zero_divs = 0;

  restoring_divider dut (
    .clk(clk), .rst(rst), .start(start), .dividend(dividend), .divisor(divisor),
    .busy(busy), .done(done), .quotient(quotient), .remainder(remainder),
    .div_by_zero(dbz));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [N-1:0] a, input logic [N-1:0] b, input bit poke);
    int cycles;
    @(negedge clk);
    dividend = a; divisor = b; start = 1'b1;
    @(negedge clk);                 // start accepted at the edge just passed
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      if (poke && cycles == 3) begin
        // a second request while busy must not disturb the running division
        start = 1'b1; dividend = ~a; divisor = b + 1;
        ignored_starts++;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      cycles++;
    end
    start = 1'b0;
    // cycles counts clock edges after the accepting one: done must be seen
    // N clocks after start was accepted
    checks++;
    if (cycles !== N) begin
      failures++;
      $display("FAIL latency %0d clocks, expected %0d", cycles, N);
    end
    checks++;
    if (b == 0) begin
      zero_divs++;
      if (!dbz || quotient !== '1) begin
        failures++;
        $display("FAIL divide by zero: dbz=%0b q=%h", dbz, quotient);
      end
    end else if (dbz || quotient !== a / b || remainder !== a % b) begin
      failures++;
      $display("FAIL %0d / %0d: q=%0d r=%0d expected q=%0d r=%0d",
               a, b, quotient, remainder, a / b, a % b);
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy with done"); end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; dividend = '0; divisor = '0;
    #12 rst = 1'b0;
    checks++;
    if (busy || done) begin failures++; $display("FAIL after reset"); end
    divide(100, 7, 1'b0);
    divide(7, 100, 1'b0);
    divide(12345, 12345, 1'b0);
    divide('1, 1, 1'b0);
    divide('1, '1, 1'b0);
    divide(32'h8000_0000, 3, 1'b1);
    divide(32'd23170 << 16, 32'd6393, 1'b0);
    divide(5, 0, 1'b0);
    for (int i = 0; i < 300; i++) begin
      logic [N-1:0] a, b;
      a = $urandom;
      b = (i % 3 == 0) ? N'($urandom_range(1, 1000)) : $urandom >> (i % 31);
      if (b == 0) b = 1;
      divide(a, b, (i % 10) == 0);
    end
    $display("ignored_starts=%0d zero_divs=%0d", ignored_starts, zero_divs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
