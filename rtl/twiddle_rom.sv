// Twiddle-factor ROM.
//
// Holds W_N^k = cos(2*pi*k/N) - i*sin(2*pi*k/N) for k = 0 .. N/2-1 as
// sign-magnitude Q2.30 words (magnitude = round(|value| * 2^30), sign bit set
// for negative values; W^0 = 1 is 2^30). The table is computed at elaboration
// by a constant function, so no data file is needed. The factors being
// pre-computed and in sign-magnitude form follows the design description; the
// rounding of the table entries is this design's choice.
//
// Timing: synchronous read, data one cycle after addr.
module twiddle_rom
  import sm_fft_pkg::*;
#(
  parameter int unsigned LOGN = 10
) (
  input  logic            clk,
  input  logic [LOGN-2:0] addr,
  output cplx_t           tw
);
  localparam int unsigned NT = 2 ** (LOGN - 1);

  typedef logic [2*DW-1:0] tab_t [NT];

  function automatic tab_t make_table();
    tab_t   t;
    real    ang, c, s;
    longint mc, ms;
    for (int k = 0; k < NT; k++) begin
      ang = 2.0 * 3.14159265358979323846 * k / (2.0 * NT);
      c   = $cos(ang);
      s   = $sin(ang);
      mc  = longint'(((c < 0.0) ? -c : c) * 1073741824.0);
      ms  = longint'(s * 1073741824.0);
      // {re, im}; -sin is never positive for k < N/2
      t[k] = {(c < 0.0) && (mc != 0), MW'(mc), ms != 0, MW'(ms)};
    end
    return t;
  endfunction

  localparam tab_t TABLE = make_table();

  always_ff @(posedge clk) tw <= TABLE[addr];
endmodule
