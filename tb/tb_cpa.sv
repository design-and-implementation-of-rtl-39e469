// Self-checking testbench of cpa at its default width of 16 bits: corner
// cases (carry through every bit, wrap-around) and 20000 random pairs,
// compared with a 32-bit sum taken modulo 2^16.
module tb_cpa;
  localparam int unsigned W = 16;  // the default width of cpa
  logic [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  cpa dut (.a(a), .b(b), .s(s));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    int unsigned expected;
    a = ta;
    b = tb_;
    #1;
    expected = (int'(ta) + int'(tb_)) % (1 << W);
    checks++;
    if (int'(s) != expected) begin
      failures++;
      $display("FAIL %0d + %0d = %0d, expected %0d", ta, tb_, s, expected);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, 16'd1);
    check(16'h7fff, 16'h0001);
    check(16'h00ff, 16'h0001);
    check(16'hffff, 16'hffff);
    check(16'haaaa, 16'h5555);
    for (int k = 0; k < 20000; k++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
