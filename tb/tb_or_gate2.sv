// tb_or_gate2 -- exhaustive check of the two-input OR of the ADC requests.
module tb_or_gate2;
  logic a, b, y;
  int checks = 0, failures = 0;

  or_gate2 dut (.a(a), .b(b), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== (i != 0)) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
