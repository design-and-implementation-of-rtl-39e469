// Self-checking testbench of pp_gen at its default size: every operand pair,
// every partial-product bit compared with m[j] & n[i], and the weighted sum
// of the matrix compared with m * n.
module tb_pp_gen;
  localparam int unsigned N = 8;   // the default size of pp_gen
  logic [N-1:0] m, n;
  logic [N-1:0] pp [N];
  int checks = 0, failures = 0;

  pp_gen dut (.m(m), .n(n), .pp(pp));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        m = N'(a);
        n = N'(b);
        #1;
        total = 0;
        for (int i = 0; i < N; i++) begin
          for (int j = 0; j < N; j++) begin
            checks++;
            if (pp[i][j] !== (m[j] & n[i])) begin
              failures++;
              if (failures < 10) $display("FAIL m=%0d n=%0d pp[%0d][%0d]=%0b", a, b, i, j, pp[i][j]);
            end
            total += int'(pp[i][j]) << (i + j);
          end
        end
        checks++;
        if (total != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d n=%0d matrix sum %0d", a, b, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
