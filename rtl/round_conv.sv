// Rounding and conditional conversion to sign-magnitude.
//
// Takes the truncated two's complement butterfly sum hi and the fraction bit
// f (MSB of the bits cut off). With scale high the result is also divided by
// two, so the next cut-off bit, hi[0], becomes the fraction bit. The word kept
// is the low 32 bits (Q2.30). Rounding adds the fraction bit to a negative
// result; conversion, when conv is high, turns a negative result into
// sign-magnitude. Both need a "+1" and a negative rounded value r = q + f is
// converted as {1, ~q} + (1 - f), so a single conditional incrementer serves
// both, as in the design description:
//   positive          y = q
//   negative, keep    y = q + f
//   negative, convert y = {1, ~q[30:0]} + ~f
// Combinational. Results that do not fit in Q2.30 wrap; the FFT keeps enough
// headroom that they do not occur (an assumption of this design).
module round_conv
  import sm_fft_pkg::*;
(
  input  logic [HW-1:0] hi,
  input  logic          f,
  input  logic          scale,
  input  logic          conv,
  output word_t         y
);
  word_t q;
  logic  fr, neg, m, ci;

  always_comb begin
    q   = scale ? hi[DW:1] : hi[DW-1:0];
    fr  = scale ? hi[0]    : f;
    neg = q[DW-1];
    m   = neg & conv;
    ci  = neg & (conv ? ~fr : fr);
    y   = {q[DW-1], q[DW-2:0] ^ {(DW-1){m}}} + DW'(ci);
  end
endmodule
