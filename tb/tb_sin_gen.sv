// tb_sin_gen: runs the generator at several frequency words and compares
// every output sample with a software model.
//
// The model keeps its own phase P (P += f per clock) and expects, one clock
// later, sin_o = ref_sin(P[31:27]) and cos_o = ref_cos(P[31:27]). This
// checks the one-sample-per-clock rate and the one-clock latency from the
// phase register to the outputs. With f = 2**27 the output must repeat
// every 32 clocks (32 samples per period). Negative half waves of both
// outputs and phase wrap-around are counted and must occur.
module tb_sin_gen;
  import tb_ref_pkg::*;
  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] f;
  logic signed [31:0] sin_o, cos_o;
  logic [31:0] phase;
  int checks = 0, failures = 0;
  int sin_negs = 0, cos_negs = 0, wraps = 0;
  logic [31:0] p_model, p_prev;
  int hist_sin [64];

  sin_gen dut (.clk(clk), .rst(rst), .f(f), .sin_o(sin_o), .cos_o(cos_o), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] fw, input int n);
    int k;
    f = fw;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      p_prev  = p_model;
      if ({1'b0, p_model} + {1'b0, fw} > 33'h0_FFFF_FFFF) wraps++;
      p_model = p_model + fw;
      k = int'(p_prev[31:27]);
      checks += 3;
      if (phase !== p_model) begin
        failures++;
        $display("FAIL phase=%h expected %h", phase, p_model);
      end
      if (int'(sin_o) !== ref_sin(k)) begin
        failures++;
        $display("FAIL k=%0d sin_o=%0d expected %0d", k, sin_o, ref_sin(k));
      end
      if (int'(cos_o) !== ref_cos(k)) begin
        failures++;
        $display("FAIL k=%0d cos_o=%0d expected %0d", k, cos_o, ref_cos(k));
      end
      if (sin_o < 0) sin_negs++;
      if (cos_o < 0) cos_negs++;
      hist_sin[i % 64] = int'(sin_o);
    end
  endtask

  initial begin
    rst = 1'b1; f = '0;
    p_model = '0;
    #12;
    checks += 2;
    if (sin_o !== 0 || cos_o !== 0) begin failures++; $display("FAIL reset"); end
    if (phase !== 0) begin failures++; $display("FAIL reset phase"); end
    // release reset right after a falling edge so the model lines up
    @(negedge clk);
    rst = 1'b0;
    // f = 0: output is the sample at phase 0 (sin 0, cos +peak)
    run(32'h0, 4);
    // one table step per clock: 32 samples per period
    run(32'h0800_0000, 64);
    for (int i = 32; i < 64; i++) begin
      checks++;
      if (hist_sin[i] !== hist_sin[i - 32]) begin
        failures++;
        $display("FAIL period is not 32 samples at i=%0d", i);
      end
    end
    run(32'h0123_4567, 300);   // slow, non-power-of-two step
    run(32'h3A5C_0F11, 300);   // fast step
    run(32'hF800_0000, 64);    // one step backwards per clock
    for (int j = 0; j < 5; j++) run($urandom, 100);
    if (sin_negs == 0) begin failures++; $display("FAIL sine never negated"); end
    if (cos_negs == 0) begin failures++; $display("FAIL cosine never negated"); end
    if (wraps == 0)    begin failures++; $display("FAIL phase never wrapped"); end
    $display("sin_negs=%0d cos_negs=%0d wraps=%0d", sin_negs, cos_negs, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
