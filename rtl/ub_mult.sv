// Unsigned radix-4 Booth multiplier for sign-magnitude magnitudes.
//
// The multiplier b is cut into two-bit digits d in {0,1,2,3}. A modified
// Booth encoder would recode these into {-2..2} and so create negative partial
// products even for positive operands; this one never does. The hard multiple
// 3a is avoided by giving every encoder two partial products: the first is
// a*{0,1,2} (a for d=1, 2a for d=2 and d=3), the second a*{0,1} (a for d=3).
// The 2*ceil(W/2) partial products are reduced by a Wallace tree (eight levels
// for W=31) and one final carry-propagate adder gives the 2W-bit product.
// Only non-negative values ever appear inside, which keeps the high bits
// quiet when the operands are small.
//
// Combinational. W=31 is the magnitude width of a Q2.30 sign-magnitude word,
// giving the 62-bit products of the butterfly. The encoding and the tree
// follow the design description; the final adder is left to synthesis.
module ub_mult #(
  parameter int unsigned W = 31
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned G  = (W + 1) / 2;  // number of encoders
  localparam int unsigned NP = 2 * G;        // partial products
  localparam int unsigned PW = 2 * W;

  logic [2*G-1:0] bx;
  logic [PW-1:0]  a1, a2;
  logic [PW-1:0]  pp [NP];
  logic [PW-1:0]  sum, carry;

  assign bx = (2*G)'(b);
  assign a1 = PW'(a);
  assign a2 = PW'(a) << 1;

  for (genvar g = 0; g < G; g++) begin : g_enc
    // encoder control signals for digit {b1,b0}
    logic one, two, one2;
    assign one  =  bx[2*g] & ~bx[2*g+1];
    assign two  =  bx[2*g+1];
    assign one2 =  bx[2*g] &  bx[2*g+1];
    assign pp[2*g]   = ((one ? a1 : '0) | (two ? a2 : '0)) << (2*g);
    assign pp[2*g+1] = (one2 ? a1 : '0) << (2*g);
  end

  wallace_tree #(.N(NP), .W(PW)) u_tree (.rows(pp), .sum(sum), .carry(carry));

  assign p = sum + carry;
endmodule
