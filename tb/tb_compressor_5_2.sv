// Self-checking testbench of compressor_5_2. All 128 input combinations:
// checks x1..x5 + cin1 + cin2 = sum + 2*(carry + cout1 + cout2), that sum is
// the parity of the seven inputs, that cout1 ignores cin1 and cin2, and that
// cout2 ignores cin2 (so cout1->cin1, cout2->cin2 chains do not ripple).
module tb_compressor_5_2;
  logic x1, x2, x3, x4, x5, cin1, cin2;
  logic sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  compressor_5_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5),
                      .cin1(cin1), .cin2(cin2), .sum(sum), .carry(carry),
                      .cout1(cout1), .cout2(cout2));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic ref_cout1, ref_cout2;
    for (int v = 0; v < 32; v++) begin
      for (int c = 0; c < 4; c++) begin
        {x1, x2, x3, x4, x5} = 5'(v);
        {cin1, cin2} = 2'(c);
        ones = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(x5) + int'(cin1) + int'(cin2);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2)) != ones ||
            sum !== 1'(ones % 2)) begin
          failures++;
          $display("FAIL x=%05b cin1=%0b cin2=%0b -> sum=%0b carry=%0b cout1=%0b cout2=%0b",
                   v[4:0], cin1, cin2, sum, carry, cout1, cout2);
        end
        // cout1 must match its value with both carry-ins at 0
        if (c == 0) ref_cout1 = cout1;
        else begin
          checks++;
          if (cout1 !== ref_cout1) begin
            failures++;
            $display("FAIL cout1 depends on a carry-in for x=%05b", v[4:0]);
          end
        end
        // cout2 must not change with cin2
        if (cin2 == 1'b0) ref_cout2 = cout2;
        else begin
          checks++;
          if (cout2 !== ref_cout2) begin
            failures++;
            $display("FAIL cout2 depends on cin2 for x=%05b cin1=%0b", v[4:0], cin1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
