// Self-checking testbench of dadda_mult_5_2: the operand pairs shown in the
// published simulation waveforms first, then all 65536 pairs of 8-bit
// operands, each product compared with m * n computed in the testbench.
module tb_dadda_mult_5_2;
  import mult_pkg::*;
  operand_t m, n;
  product_t p;
  int checks = 0, failures = 0;

  dadda_mult_5_2 dut (.m(m), .n(n), .p(p));

  task automatic check(input operand_t ma, input operand_t nb);
    int unsigned a, b;
    a = int'(ma);
    b = int'(nb);
    m = OP_W'(a);
    n = OP_W'(b);
    #1;
    checks++;
    if (int'(p) != a * b) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, expected %0d", a, b, p, a * b);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // operand pairs of the published waveforms (binary as printed there)
    check(8'b11000000, 8'b10001000);
    check(8'b10101000, 8'b00000111);
    check(8'b00010110, 8'b11001100);
    check(8'b01010101, 8'b00000001);
    check(8'b01101100, 8'b11010000);
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++)
        check(OP_W'(a), OP_W'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
