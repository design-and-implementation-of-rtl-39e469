// Self-checking testbench of compressor_4_2. All 32 input combinations:
// checks x1+x2+x3+x4+cin = sum + 2*(carry+cout), that sum is the parity of
// the five inputs, and that cout does not change when only cin changes (the
// property that keeps a row of chained compressors from rippling).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic cout_cin0;
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        {x1, x2, x3, x4} = 4'(v);
        cin = 1'(c);
        ones = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != ones || sum !== 1'(ones % 2)) begin
          failures++;
          $display("FAIL x=%04b cin=%0b -> sum=%0b carry=%0b cout=%0b", v[3:0], cin, sum, carry, cout);
        end
        if (c == 0) cout_cin0 = cout;
        else begin
          checks++;
          if (cout !== cout_cin0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%04b", v[3:0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
