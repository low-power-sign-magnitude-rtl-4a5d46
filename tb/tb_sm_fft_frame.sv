// Range-Doppler frame testbench of sm_fft at its default parameters.
//
// Processes one synthetic FMCW frame of CHIRPS chirps of SAMPLES real 12-bit
// samples on a single core, the way a 2D FFT is run on it:
//   * a SAMPLES-bin range transform of every chirp; the upper half of each
//     result is discarded, because the input is real;
//   * a CHIRPS-bin Doppler transform of every kept range bin across the
//     chirps, loaded through the word port.
// The frame holds two moving targets (one strong, one weak) plus about two
// bits of noise. Every transform is compared bin by bin with a
// double-precision DFT of exactly the data the core was given, scaled as
// the core scales. The strongest cell of the range-Doppler map must sit at
// the strong target's range and Doppler bins. The default is the full frame
// of 512 chirps of 1024 samples.
module tb_sm_fft_frame;
  import sm_fft_pkg::*;
  localparam int unsigned LOGN     = 10;   // sm_fft default
  localparam int unsigned N        = 2 ** LOGN;
  localparam int unsigned IN_W     = 12;
  localparam int unsigned IN_SHIFT = 12;   // sm_fft default
  localparam int unsigned LR       = 10;   // log2 SAMPLES
  localparam int unsigned LD       = 9;    // log2 CHIRPS
  localparam int unsigned SAMPLES  = 2 ** LR;
  localparam int unsigned CHIRPS   = 2 ** LD;
  localparam int unsigned RBINS    = SAMPLES / 2;
  localparam real         TOL      = 24.0;
  localparam real         PI       = 3.14159265358979323846;
  localparam int unsigned LW       = $clog2(LOGN + 1);
  // targets: range bin, Doppler bin (both a little off-bin), amplitude
  localparam real R1 = 200.3, D1 = 37.4, A1 = 1200.0;
  localparam real R2 = 411.7, D2 = 402.2, A2 = 6.0;

  logic            clk = 0, rst_n = 0;
  logic [LW-1:0]   logn = '0;
  logic            in_valid = 0, in_word = 0, in_ready, start = 0, busy, done;
  logic [IN_W-1:0] in_re = '0, in_im = '0;
  word_t           in_wre = '0, in_wim = '0;
  logic            out_rd = 0, out_valid;
  logic [LOGN-1:0] out_addr = '0;
  word_t           out_re, out_im;

  sm_fft dut (.clk, .rst_n, .logn, .in_valid, .in_word, .in_re, .in_im, .in_wre, .in_wim,
              .in_ready, .start, .busy, .done, .out_rd, .out_addr, .out_valid, .out_re, .out_im);

  int checks = 0, failures = 0;
  int n_range = 0, n_doppler = 0;
  real maxerr = 0.0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cos_t [N], sin_t [N];
  int  xin_re [N], xin_im [N];       // input of the current transform
  int  xout_re [N], xout_im [N];     // its result
  int  rmap_re [CHIRPS][RBINS];      // range results, chirp by bin
  int  rmap_im [CHIRPS][RBINS];

  // load xin, transform, read into xout, compare with a DFT of xin
  task automatic transform(input int L, input bit words, input string name);
    int  M, busy_cycles;
    real sc, er, ei, dr, di;
    M = 1 << L;
    logn = LW'(L);
    in_word = words;
    for (int n = 0; n < M; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_re  = IN_W'(xin_re[n]);
      in_im  = IN_W'(xin_im[n]);
      in_wre = word_t'(xin_re[n]);
      in_wim = word_t'(xin_im[n]);
    end
    @(negedge clk);
    in_valid = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    busy_cycles = 0;
    while (busy) begin
      @(posedge clk);
      busy_cycles++;
      #1;
    end
    checks++;
    if (busy_cycles != L * (M / 2 + 3)) begin
      failures++;
      $display("FAIL %s: busy %0d cycles", name, busy_cycles);
    end
    sc = real'(words ? 1 : (1 << IN_SHIFT)) / real'(1 << (L / 2));
    for (int k = 0; k < M; k++) begin
      @(negedge clk);
      out_rd = 1;
      out_addr = LOGN'(k);
      @(posedge clk);
      #1;
      out_rd = 0;
      xout_re[k] = $signed(out_re);
      xout_im[k] = $signed(out_im);
      er = 0.0;
      ei = 0.0;
      for (int n = 0; n < M; n++) begin
        int idx = ((k * n) % M) * (N / M);
        er += xin_re[n] * cos_t[idx] + xin_im[n] * sin_t[idx];
        ei += xin_im[n] * cos_t[idx] - xin_re[n] * sin_t[idx];
      end
      dr = xout_re[k] - er * sc;
      di = xout_im[k] - ei * sc;
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > maxerr) maxerr = dr;
      if (di > maxerr) maxerr = di;
      checks++;
      if (!out_valid || dr > TOL || di > TOL) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s bin %0d: %0d/%0d expected %f/%f", name, k, xout_re[k], xout_im[k], er * sc, ei * sc);
      end
    end
  endtask

  function automatic int noise2();
    return int'($urandom_range(3)) + int'($urandom_range(3)) - 3;
  endfunction

  initial begin
    real best;
    int  best_r, best_d;
    for (int i = 0; i < N; i++) begin
      cos_t[i] = $cos(2.0 * PI * i / N);
      sin_t[i] = $sin(2.0 * PI * i / N);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // range FFTs
    for (int c = 0; c < CHIRPS; c++) begin
      for (int n = 0; n < SAMPLES; n++) begin
        real v;
        v = A1 * $cos(2.0 * PI * (R1 * n / SAMPLES + D1 * c / CHIRPS))
          + A2 * $cos(2.0 * PI * (R2 * n / SAMPLES + D2 * c / CHIRPS));
        xin_re[n] = int'(v) + noise2();
        xin_im[n] = 0;
      end
      transform(LR, 0, "range");
      n_range++;
      for (int k = 0; k < RBINS; k++) begin
        rmap_re[c][k] = xout_re[k];
        rmap_im[c][k] = xout_im[k];
      end
    end

    // Doppler FFTs over the kept range bins
    best = -1.0;
    best_r = -1;
    best_d = -1;
    for (int k = 0; k < RBINS; k++) begin
      for (int c = 0; c < CHIRPS; c++) begin
        xin_re[c] = rmap_re[c][k];
        xin_im[c] = rmap_im[c][k];
      end
      transform(LD, 1, "doppler");
      n_doppler++;
      for (int d = 0; d < CHIRPS; d++) begin
        real p;
        p = real'(xout_re[d]) * real'(xout_re[d]) + real'(xout_im[d]) * real'(xout_im[d]);
        if (p > best) begin
          best = p;
          best_r = k;
          best_d = d;
        end
      end
    end

    $display("%0d range and %0d Doppler transforms, largest error %f LSB, peak at range %0d Doppler %0d",
             n_range, n_doppler, maxerr, best_r, best_d);
    checks++;
    if (best_r != int'(R1) || best_d != int'(D1)) begin
      failures++;
      $display("FAIL strongest cell at %0d/%0d, expected %0d/%0d", best_r, best_d, int'(R1), int'(D1));
    end
    checks++;
    if (n_range != CHIRPS || n_doppler != RBINS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
