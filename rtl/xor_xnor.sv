// XOR-XNOR cell: produces a XOR b and a XNOR b at the same time.
// In the 4-2 compressor the complementary pair lets a following 2:1
// multiplexer form a three-input XOR without a separate inverter. The
// transistor-level, transmission-gate realisation of the cell is not modelled;
// this is its logic function only.
// Interface: inputs a, b; outputs x (XOR) and xn (XNOR). Purely combinational.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);
  always_comb begin
    x  = a ^ b;
    xn = ~(a ^ b);
  end
endmodule
