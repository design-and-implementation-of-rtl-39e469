// 2:1 multiplexer, the steering element of the XOR-XNOR based 4-2 compressor.
// Interface: d0 is passed when s = 0, d1 when s = 1. Purely combinational.
module mux2 (
  input  logic s,
  input  logic d0,
  input  logic d1,
  output logic y
);
  always_comb y = s ? d1 : d0;
endmodule
