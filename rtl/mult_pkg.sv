// Shared sizes and types of the 8x8 compressor-based multipliers.
// The operand width of 8 bits is the one the design is built around; the
// product is twice as wide.
package mult_pkg;
  parameter int unsigned OP_W   = 8;          // operand width m, n
  parameter int unsigned PROD_W = 2 * OP_W;   // product width P

  typedef logic [OP_W-1:0]   operand_t;
  typedef logic [PROD_W-1:0] product_t;
endpackage
