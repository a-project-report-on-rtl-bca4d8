// tb_combined_mixer: feeds sample pairs of two 32-sample generators (coarse
// sample kx, fine sample ky) and random in-range samples. Checks the mixer
// output one clock later against (a*b +/- c*d) >>> 15 in integer arithmetic,
// and for generator samples also against 32767*sin/cos(2*pi*(kx+ky)/32)
// within 3 LSB, the angle-sum identity the mixer implements.
module tb_combined_mixer;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  logic rst;
  logic signed [31:0] sin_x, cos_x, sin_y, cos_y, sin_o, cos_o;
  int checks = 0, failures = 0;

  combined_mixer dut (
    .clk(clk), .rst(rst), .sin_x(sin_x), .cos_x(cos_x), .sin_y(sin_y), .cos_y(cos_y),
    .sin_o(sin_o), .cos_o(cos_o));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int sx, input int cx, input int sy, input int cy,
                       input bit ideal, input int k);
    longint es, ec;
    real rs, rc;
    @(negedge clk);
    sin_x = sx; cos_x = cx; sin_y = sy; cos_y = cy;
    es = (longint'(sx) * cy + longint'(cx) * sy) >>> 15;
    ec = (longint'(cx) * cy - longint'(sx) * sy) >>> 15;
    @(negedge clk);
    checks += 2;
    if (longint'(sin_o) !== es || longint'(cos_o) !== ec) begin
      failures++;
      $display("FAIL sin=%0d cos=%0d expected %0d %0d", sin_o, cos_o, es, ec);
    end
    if (ideal) begin
      rs = 32767.0 * $sin(2.0 * 3.14159265358979 * k / 32.0);
      rc = 32767.0 * $cos(2.0 * 3.14159265358979 * k / 32.0);
      checks += 2;
      if ((real'(sin_o) - rs) > 3.0 || (rs - real'(sin_o)) > 3.0) begin
        failures++; $display("FAIL sin(x+y) k=%0d: %0d vs %f", k, sin_o, rs);
      end
      if ((real'(cos_o) - rc) > 3.0 || (rc - real'(cos_o)) > 3.0) begin
        failures++; $display("FAIL cos(x+y) k=%0d: %0d vs %f", k, cos_o, rc);
      end
    end
  endtask

  initial begin
    rst = 1'b1; sin_x = 0; cos_x = 0; sin_y = 0; cos_y = 0;
    #12 rst = 1'b0;
    checks++;
    if (sin_o !== 0 || cos_o !== 0) begin failures++; $display("FAIL reset"); end
    for (int kx = 0; kx < 32; kx++)
      for (int ky = 0; ky < 32; ky += 3)
        apply(ref_sin(kx), ref_cos(kx), ref_sin(ky), ref_cos(ky), 1'b1, kx + ky);
    for (int i = 0; i < 200; i++)
      apply(int'($urandom_range(0, 65534)) - 32767, int'($urandom_range(0, 65534)) - 32767,
            int'($urandom_range(0, 65534)) - 32767, int'($urandom_range(0, 65534)) - 32767,
            1'b0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
