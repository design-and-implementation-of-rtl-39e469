// Self-checking testbench of full_adder: all eight input combinations,
// checking a + b + c = sum + 2*carry bit by bit.
module tb_full_adder;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      ones = int'(a) + int'(b) + int'(c);
      #1;
      checks++;
      if (sum !== 1'(ones % 2) || carry !== 1'(ones / 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b sum=%0b carry=%0b", a, b, c, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
