// tb_sign_adder_reg: random samples with random sign control; the register
// must hold +u or -u (32-bit two's complement) one clock later, and clear on
// reset. Also checks that bits 31..15 are sign copies for u <= 32767.
module tb_sign_adder_reg;
  logic        clk = 1'b0;
  logic        rst;
  logic        negate;
  logic [15:0] u;
  logic signed [31:0] y;
  int checks = 0, failures = 0, negs = 0;
  longint exp_v;

  sign_adder_reg dut (.clk(clk), .rst(rst), .negate(negate), .u(u), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; negate = 1'b0; u = '0;
    #12;
    checks++;
    if (y !== 0) begin failures++; $display("FAIL reset y=%0d", y); end
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      negate = 1'($urandom);
      u      = (i < 250) ? 16'($urandom_range(0, 32767)) : 16'($urandom);
      exp_v  = negate ? -longint'(u) : longint'(u);
      if (negate) negs++;
      @(negedge clk);
      checks++;
      if (longint'(y) !== exp_v) begin
        failures++;
        $display("FAIL negate=%0b u=%0d y=%0d expected %0d", negate, u, y, exp_v);
      end
      if (i < 250) begin
        checks++;
        if (!(&y[31:15]) && (|y[31:15])) begin
          failures++;
          $display("FAIL upper bits not sign copies: %h", y);
        end
      end
    end
    if (negs == 0) begin failures++; $display("FAIL never negated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
