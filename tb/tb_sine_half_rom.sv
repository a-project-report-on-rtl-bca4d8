// tb_sine_half_rom: reads every entry of the 16 x 16-bit half-period table
// and compares it with round(32767 * sin(pi * i / 16)), listed in
// tb_ref_pkg, and with the same formula evaluated here in real arithmetic.
module tb_sine_half_rom;
  import tb_ref_pkg::*;
  logic [3:0]  addr;
  logic [15:0] data;
  int checks = 0, failures = 0;

  sine_half_rom dut (.addr(addr), .data(data));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
      checks++;
      if (int'(data) !== HALF[i]) begin
        failures++;
        $display("FAIL addr=%0d data=%0d expected %0d", i, data, HALF[i]);
      end
      r = 32767.0 * $sin(3.14159265358979 * i / 16.0);
      checks++;
      if ((real'(data) - r) > 0.5 || (r - real'(data)) > 0.5) begin
        failures++;
        $display("FAIL addr=%0d data=%0d off from %f", i, data, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
