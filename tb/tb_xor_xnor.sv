// Self-checking testbench of xor_xnor: all four input pairs, both outputs
// compared with the truth table of XOR and XNOR.
module tb_xor_xnor;
  logic a, b, x, xn;
  int checks = 0, failures = 0;

  xor_xnor dut (.a(a), .b(b), .x(x), .xn(xn));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (x !== (a != b) || xn !== (a == b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b x=%0b xn=%0b", a, b, x, xn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
