// Low-power sign-magnitude radix-2 FFT, computed sequentially on one
// hybrid butterfly.
//
// The design keeps every value that is about to be multiplied in
// sign-magnitude form and every value that is about to be added in two's
// complement form. Small values, which dominate inside FFTs of radar data,
// then have mostly zero high bits in the multipliers, and the unsigned Booth
// multipliers never create negative partial products, so the wide datapath
// switches little. The blocks are:
//   sample_ram   N complex Q2.30 words, two read and two write ports
//   twiddle_rom  N/2 sign-magnitude twiddle factors
//   fft_ctrl     stage/butterfly sequencer with Cin/Cout/scale generation
//   bf_hybrid    two-stage pipelined hybrid butterfly
//
// Operation:
//   0. Size: logn = L selects a 2^L-bin transform (1 <= L <= LOGN); hold it
//      from the first sample loaded to the last bin read.
//   1. Load: while idle, present 2^L samples in natural order with in_valid
//      (one per cycle or slower). With in_word = 0 a sample is a pair of
//      IN_W-bit two's complement integers on in_re/in_im, stored as the
//      Q2.30 sign-magnitude word sample * 2^IN_SHIFT LSBs. With in_word = 1
//      it is a pair of two's complement Q2.30 words on in_wre/in_wim, such as
//      range-FFT bins entering a Doppler FFT. Samples go to bit-reversed
//      addresses; after 2^L samples the load counter wraps to 0.
//   2. Compute: pulse start. busy is high for L*(2^L/2 + 3) cycles, then
//      done pulses. Every second stage divides by two.
//   3. Read: while idle, out_rd with out_addr = k returns bin X[k] one cycle
//      later on out_re/out_im with out_valid, in two's complement Q2.30.
//      The stored bins are divided by 2^floor(L/2) against the plain DFT.
//
// The number format, butterfly, conversion scheme, rounding, 12-bit input
// samples, Q2.30 words, scaling and N = 1024 follow the design description.
// The memory organisation, the load/start/read handshake, the run-time size,
// the word load port and IN_SHIFT (input headroom, which keeps results from
// wrapping) are this design's choices.
module sm_fft
  import sm_fft_pkg::*;
#(
  parameter int unsigned LOGN     = 10,
  parameter int unsigned IN_W     = 12,
  parameter int unsigned IN_SHIFT = 12,
  localparam int unsigned LW      = $clog2(LOGN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // transform size: log2 of the number of bins, 1..LOGN, held from load to read-out
  input  logic [LW-1:0]   logn,
  // sample load
  input  logic            in_valid,
  input  logic            in_word,   // 1: load in_wre/in_wim, 0: load in_re/in_im
  input  logic [IN_W-1:0] in_re,
  input  logic [IN_W-1:0] in_im,
  input  word_t           in_wre,    // two's complement Q2.30 word
  input  word_t           in_wim,
  output logic            in_ready,
  // transform control
  input  logic            start,
  output logic            busy,
  output logic            done,
  // result read-out
  input  logic            out_rd,
  input  logic [LOGN-1:0] out_addr,
  output logic            out_valid,
  output word_t           out_re,
  output word_t           out_im
);
  // ---------------- input conversion ----------------
  function automatic word_t sample_to_sm(logic [IN_W-1:0] s);
    logic [IN_W-1:0] mag;
    mag = s[IN_W-1] ? (~s + 1'b1) : s;
    return {s[IN_W-1], MW'({mag, IN_SHIFT'(0)})};
  endfunction

  // reverse the low logn bits of a (a < 2^logn)
  function automatic logic [LOGN-1:0] bitrev(logic [LOGN-1:0] a, logic [LW-1:0] l);
    logic [LOGN-1:0] r;
    for (int k = 0; k < LOGN; k++) r[k] = a[LOGN-1-k];
    return r >> (LW'(LOGN) - l);
  endfunction

  logic [LOGN-1:0] load_cnt, load_last;
  logic            load_we;
  cplx_t           word_sm, load_data;

  assign in_ready  = !busy;
  assign load_we   = in_valid && in_ready;
  assign load_last = LOGN'(({{(LOGN-1){1'b0}}, 1'b1} << logn) - 1'b1);

  // full words (e.g. range-FFT results fed to a Doppler FFT) enter in two's
  // complement and are stored in sign-magnitude like the samples
  sm_conv #(.W(DW)) u_win_re (.x(in_wre), .sel(1'b1), .y(word_sm.re));
  sm_conv #(.W(DW)) u_win_im (.x(in_wim), .sel(1'b1), .y(word_sm.im));

  assign load_data = in_word ? word_sm
                             : cplx_t'{re: sample_to_sm(in_re), im: sample_to_sm(in_im)};

  always_ff @(posedge clk) begin
    if (!rst_n) load_cnt <= '0;
    else if (load_we) load_cnt <= (load_cnt == load_last) ? '0 : load_cnt + 1'b1;
  end

  // ---------------- sequencer ----------------
  // rd_en and draining are sequencer status the top does not need
  logic            rd_en, bf_valid, wr_en, draining;
  logic [LOGN-1:0] ra0, ra1, wa0, wa1;
  logic [LOGN-2:0] tw_addr;
  bf_ctrl_t        bf_ctrl;

  fft_ctrl #(.LOGN(LOGN)) u_ctrl (
    .clk, .rst_n, .start(start && !busy), .logn, .busy, .done, .draining,
    .rd_en, .ra0, .ra1, .tw_addr, .bf_valid, .bf_ctrl, .wr_en, .wa0, .wa1
  );

  // ---------------- memory and twiddles ----------------
  cplx_t rd0, rd1, tw, y0, y1;
  logic  bf_out_valid;

  sample_ram #(.LOGN(LOGN)) u_ram (
    .clk,
    .ra0 (busy ? ra0 : out_addr), .ra1 (ra1), .rd0, .rd1,
    .we0 (busy ? wr_en : load_we),
    .wa0 (busy ? wa0 : bitrev(load_cnt, logn)),
    .wd0 (busy ? y0 : load_data),
    .we1 (busy && wr_en), .wa1 (wa1), .wd1 (y1)
  );

  twiddle_rom #(.LOGN(LOGN)) u_rom (.clk, .addr(tw_addr), .tw);

  // ---------------- butterfly ----------------
  bf_hybrid u_bf (
    .clk, .rst_n, .in_valid(bf_valid), .x0(rd0), .x1(rd1), .tw, .ctrl(bf_ctrl),
    .out_valid(bf_out_valid), .y0, .y1
  );

  // write-back is timed by the sequencer; the butterfly's own valid must agree
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_wb_aligned: assert (bf_out_valid == wr_en)
        else $error("sm_fft: butterfly output and write-back out of step");
    end
  end

  // ---------------- read-out ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= out_rd && !busy;
  end
  assign out_re = rd0.re;
  assign out_im = rd0.im;
endmodule
