// 3:2 carry-save counter row.
//
// Adds three W-bit operands into a sum row and a carry row with no carry
// propagation: s = a ^ b ^ c, and co is the bitwise majority shifted up one
// place. Bit 0 of the carry row is free and takes the ci input, which is how
// the "+1" of a two's complement conversion is folded into the tree instead of
// needing an adder of its own. Everything is modulo 2^W. Purely combinational.
module csa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);
  logic [W-2:0] maj;  // the majority of the top bit falls off modulo 2^W

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    co  = {maj, ci};
  end
endmodule
