// Conditional converter between sign-magnitude and two's complement.
//
// When sel is high and the word is negative, all bits below the MSB are
// inverted and the MSB is added at the LSB; otherwise the word passes through.
// The same operation maps sign-magnitude to two's complement and back, and
// turns both +0 and -0 into 0. This is the converter of the hybrid butterfly;
// its conditional form (the MSB replaced by MSB AND sel) is the one used on the
// butterfly inputs (Cin). Combinational; W is the word width.
module sm_conv #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic         sel,
  output logic [W-1:0] y
);
  logic m;

  always_comb begin
    m = x[W-1] & sel;
    y = {x[W-1], x[W-2:0] ^ {(W-1){m}}} + W'(m);
  end
endmodule
