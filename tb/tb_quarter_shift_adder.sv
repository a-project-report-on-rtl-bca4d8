// tb_quarter_shift_adder: all four quadrant codes; t2 must be the next
// quadrant (a +90 degree step), wrapping from 3 to 0.
module tb_quarter_shift_adder;
  logic [1:0] msb2, t2;
  int checks = 0, failures = 0;
  localparam logic [1:0] NEXT [4] = '{2'd1, 2'd2, 2'd3, 2'd0};

  quarter_shift_adder dut (.msb2(msb2), .t2(t2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 4; q++) begin
      msb2 = 2'(q);
      #1;
      checks++;
      if (t2 !== NEXT[q]) begin
        failures++;
        $display("FAIL msb2=%0d t2=%0d expected %0d", q, t2, NEXT[q]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
