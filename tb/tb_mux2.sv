// Self-checking testbench of mux2: all eight input combinations.
module tb_mux2;
  logic s, d0, d1, y;
  int checks = 0, failures = 0;

  mux2 dut (.s(s), .d0(d0), .d1(d1), .y(y));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, d1, d0} = 3'(v);
      #1;
      checks++;
      if (y !== ((s == 1'b1) ? d1 : d0)) begin
        failures++;
        $display("FAIL s=%0b d0=%0b d1=%0b y=%0b", s, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
