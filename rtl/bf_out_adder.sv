// Output-stage adder of the hybrid butterfly.
//
// Computes x0 * 2^30 + (pa + sa) + (pb + sb) at full precision, where pa and
// pb are the 63-bit rows left by the product converters (magnitude XOR sign)
// and sa, sb the sign bits whose "+1" completes each two's complement
// conversion. Instead of a 64-bit carry-propagate adder the three rows go
// through one carry-save row (sa enters at its free carry bit, sb as the carry
// into the final adder). The final adder is split: a 30-bit adder for the bits
// that are cut away, whose MSB is the fraction bit F used for rounding, and an
// adder for the upper 34 bits. The design description gives this CSA plus
// split adder structure; the 30-bit split point follows from Q2.30 words.
//
// Combinational. hi is the sum with its 30 fraction bits removed (two's
// complement), f the MSB of what was removed.
module bf_out_adder
  import sm_fft_pkg::*;
(
  input  word_t         x0,   // two's complement Q2.30
  input  logic [PW:0]   pa,   // converted product row, missing its +sa
  input  logic          sa,
  input  logic [PW:0]   pb,
  input  logic          sb,
  output logic [HW-1:0] hi,
  output logic          f
);
  logic [SW-1:0] ra, rb, rx, s, c;
  logic [FRAC:0] lo;

  assign rx = {{(SW-DW){x0[DW-1]}}, x0} << FRAC;
  assign ra = {pa[PW], pa};
  assign rb = {pb[PW], pb};

  csa #(.W(SW)) u_csa (.a(rx), .b(ra), .c(rb), .ci(sa), .s(s), .co(c));

  always_comb begin
    lo = {1'b0, s[FRAC-1:0]} + {1'b0, c[FRAC-1:0]} + (FRAC+1)'(sb);
    hi = s[SW-1:FRAC] + c[SW-1:FRAC] + HW'(lo[FRAC]);
    f  = lo[FRAC-1];
  end
endmodule
