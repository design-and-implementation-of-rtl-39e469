// End-to-end testbench of mult8x8_top at its default (and only) size: all
// 65536 operand pairs, both products compared with m * n. It also counts how
// often each mechanism of the two trees is exercised and fails if one never
// is: a same-level cout passed to the next column's 4-2 compressor, the cout1
// and cout2 passed between 5-2 compressors, a carry that the final adder
// propagates across the column-7/8 boundary, and a product using bit 15.
module tb_mult8x8_top;
  import mult_pkg::*;
  operand_t m, n;
  product_t p42, p52;
  int checks = 0, failures = 0;
  int n_cout42 = 0, n_cout1_52 = 0, n_cout2_52 = 0, n_cpa_carry = 0, n_msb = 0;

  mult8x8_top dut (.m(m), .n(n), .p42(p42), .p52(p52));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        m = OP_W'(a);
        n = OP_W'(b);
        #1;
        checks += 2;
        if (int'(p42) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL 4-2: %0d * %0d = %0d", a, b, p42);
        end
        if (int'(p52) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL 5-2: %0d * %0d = %0d", a, b, p52);
        end
        if (dut.u_mult_4_2.s1_c7_0_cout || dut.u_mult_4_2.s2_c8_0_cout) n_cout42++;
        if (dut.u_mult_5_2.s1_c7_0_cout1 || dut.u_mult_5_2.s2_c8_0_cout1) n_cout1_52++;
        if (dut.u_mult_5_2.s1_c7_0_cout2 || dut.u_mult_5_2.s2_c8_0_cout2) n_cout2_52++;
        if ((17'(dut.u_mult_4_2.row_a[7:0]) + 17'(dut.u_mult_4_2.row_b[7:0])) >= 17'd256) n_cpa_carry++;
        if (p42[PROD_W-1]) n_msb++;
      end
    end
    $display("mechanisms: 4-2 cout chain %0d, 5-2 cout1 chain %0d, 5-2 cout2 chain %0d, CPA carry into bit 8 %0d, bit-15 products %0d",
             n_cout42, n_cout1_52, n_cout2_52, n_cpa_carry, n_msb);
    checks += 5;
    if (n_cout42 == 0)    failures++;
    if (n_cout1_52 == 0)  failures++;
    if (n_cout2_52 == 0)  failures++;
    if (n_cpa_carry == 0) failures++;
    if (n_msb == 0)       failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
