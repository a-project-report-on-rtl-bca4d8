// tb_phase_accumulator: checks RgP += f every clock, wrap-around, reset and
// a change of f on the fly against a software phase model.
module tb_phase_accumulator;
  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] f;
  logic [31:0] phase;
  int checks = 0, failures = 0, wraps = 0;
  logic [31:0] model;

  phase_accumulator dut (.clk(clk), .rst(rst), .f(f), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp);
    checks++;
    if (phase !== exp) begin
      failures++;
      $display("FAIL phase=%h expected %h", phase, exp);
    end
  endtask

  initial begin
    f   = 32'h0;
    rst = 1'b1;
    #12;
    check(32'h0);
    rst = 1'b0;
    model = 32'h0;
    for (int i = 0; i < 400; i++) begin
      if (i % 50 == 0) f = $urandom;
      if (i == 200) f = 32'hF000_0000;
      @(negedge clk);
      if ({1'b0, model} + {1'b0, f} > 33'h0_FFFF_FFFF) wraps++;
      model = model + f;
      check(model);
    end
    // asynchronous reset clears the phase between clock edges
    #2 rst = 1'b1;
    #1 check(32'h0);
    rst = 1'b0;
    if (wraps == 0) begin
      failures++;
      $display("FAIL phase never wrapped");
    end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
