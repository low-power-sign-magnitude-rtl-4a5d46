// End-to-end testbench of sm_fft at its default size (1024 bins).
//
// Runs four transforms: 1024-bin transforms of a strong real sine
// (amplitude 4000/4096 of full scale, off-bin frequency) plus small noise, of
// a weak real sine (amplitude one LSB) plus noise, and of uniformly random
// complex 12-bit samples; and a 512-bin transform (the Doppler size) of
// random complex Q2.30 words loaded through the word port. For each one the
// samples are loaded (with random gaps), the transform is started, its
// duration checked against L*(2^L/2 + 3) cycles, and every bin read back and
// compared with a double-precision DFT of the same input scaled by
// 2^IN_SHIFT (samples only) / 2^floor(L/2). The fixed-point result must lie within TOL
// LSBs of it. The testbench also counts how often each mechanism of the
// design was exercised (input conversion, output conversion, scaling
// stages, rounding increments, inter-stage drains) and counts a failure for
// any that never happened.
module tb_sm_fft;
  import sm_fft_pkg::*;
  localparam int unsigned LOGN     = 10;   // must match the sm_fft defaults
  localparam int unsigned N        = 2 ** LOGN;
  localparam int unsigned IN_W     = 12;
  localparam int unsigned IN_SHIFT = 12;
  localparam real         TOL      = 24.0;
  localparam real         PI       = 3.14159265358979323846;

  localparam int unsigned LW       = $clog2(LOGN + 1);

  logic            clk = 0, rst_n = 0;
  logic [LW-1:0]   logn = LW'(LOGN);
  logic            in_valid = 0, in_word = 0, in_ready, start = 0, busy, done;
  logic [IN_W-1:0] in_re = '0, in_im = '0;
  word_t           in_wre = '0, in_wim = '0;
  logic            out_rd = 0, out_valid;
  logic [LOGN-1:0] out_addr = '0;
  word_t           out_re, out_im;

  sm_fft dut (.clk, .rst_n, .logn, .in_valid, .in_word, .in_re, .in_im, .in_wre, .in_wim, .in_ready, .start, .busy, .done,
              .out_rd, .out_addr, .out_valid, .out_re, .out_im);

  int checks = 0, failures = 0, cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_cin = 0, n_cout = 0, n_scale = 0, n_round = 0, n_negconv = 0, n_drain = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.bf_valid && dut.bf_ctrl.cin)   n_cin++;
      if (dut.bf_valid && dut.bf_ctrl.cout0) n_cout++;
      if (dut.bf_valid && dut.bf_ctrl.scale) n_scale++;
      if (dut.u_bf.r_valid && (dut.u_bf.u_rc0re.ci || dut.u_bf.u_rc1re.ci)) n_round++;
      if (dut.u_bf.r_valid && (dut.u_bf.u_rc0re.m || dut.u_bf.u_rc1re.m)) n_negconv++;
      if (dut.draining) n_drain++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  xs_re [N], xs_im [N];
  real cos_t [N], sin_t [N];

  function automatic int clip(int v);
    int hi = (1 << (IN_W - 1)) - 1;
    return (v > hi) ? hi : (v < -hi - 1) ? -hi - 1 : v;
  endfunction

  function automatic int noise2();   // roughly Gaussian, about two bits wide
    return int'($urandom_range(3)) + int'($urandom_range(3)) - 3;
  endfunction

  task automatic run_one(input string name, input int L, input bit words);
    int  t0, busy_cycles, M;
    real sc, er, ei, dr, di, maxerr, peak;
    M = 1 << L;
    logn = LW'(L);
    in_word = words;
    // load
    for (int n = 0; n < M; n++) begin
      @(negedge clk);
      while ($urandom_range(7) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_re  = IN_W'(xs_re[n]);
      in_im  = IN_W'(xs_im[n]);
      in_wre = word_t'(xs_re[n]);
      in_wim = word_t'(xs_im[n]);
    end
    @(negedge clk);
    in_valid = 0;
    // transform
    start = 1;
    @(negedge clk);
    start = 0;
    busy_cycles = 0;
    t0 = cycle;
    while (busy) begin
      @(posedge clk);
      busy_cycles++;
      #1;
    end
    checks++;
    if (busy_cycles != L * (M / 2 + 3)) begin
      failures++;
      $display("FAIL %s: transform busy %0d cycles, expected %0d", name, busy_cycles, L * (M / 2 + 3));
    end
    // read back and compare
    sc = real'(words ? 1 : (1 << IN_SHIFT)) / real'(1 << (L / 2));
    maxerr = 0.0;
    peak = 0.0;
    for (int k = 0; k < M; k++) begin
      @(negedge clk);
      out_rd = 1;
      out_addr = LOGN'(k);
      @(posedge clk);
      #1;
      out_rd = 0;
      er = 0.0;
      ei = 0.0;
      for (int n = 0; n < M; n++) begin
        int idx = ((k * n) % M) * (N / M);
        er += xs_re[n] * cos_t[idx] + xs_im[n] * sin_t[idx];
        ei += xs_im[n] * cos_t[idx] - xs_re[n] * sin_t[idx];
      end
      er *= sc;
      ei *= sc;
      dr = real'($signed(out_re)) - er;
      di = real'($signed(out_im)) - ei;
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > maxerr) maxerr = dr;
      if (di > maxerr) maxerr = di;
      if (er > peak) peak = er;
      if (-er > peak) peak = -er;
      checks++;
      if (!out_valid || dr > TOL || di > TOL) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s bin %0d: %0d/%0d expected %f/%f valid=%b", name, k,
                   $signed(out_re), $signed(out_im), er, ei, out_valid);
      end
    end
    $display("%s: %0d cycles, largest error %f LSB, peak %f LSB", name, busy_cycles, maxerr, peak);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      cos_t[i] = $cos(2.0 * PI * i / N);
      sin_t[i] = $sin(2.0 * PI * i / N);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    for (int n = 0; n < N; n++) begin
      xs_re[n] = clip(int'(4000.0 / 4096.0 * 2047.0 * $cos(2.0 * PI * 100.3 * n / N)) + noise2());
      xs_im[n] = 0;
    end
    run_one("strong sine", LOGN, 0);

    for (int n = 0; n < N; n++) begin
      xs_re[n] = clip(int'($cos(2.0 * PI * 317.6 * n / N)) + noise2());
      xs_im[n] = 0;
    end
    run_one("weak sine", LOGN, 0);

    for (int n = 0; n < N; n++) begin
      xs_re[n] = int'($signed(IN_W'($urandom)));
      xs_im[n] = int'($signed(IN_W'($urandom)));
    end
    run_one("random complex", LOGN, 0);

    for (int n = 0; n < N / 2; n++) begin
      xs_re[n] = $signed(32'($urandom)) >>> 8;
      xs_im[n] = $signed(32'($urandom)) >>> 8;
    end
    run_one("512-bin Q2.30 words", LOGN - 1, 1);

    $display("mechanisms: cin %0d, cout %0d, scale %0d, rounding %0d, negative conversions %0d, drain cycles %0d",
             n_cin, n_cout, n_scale, n_round, n_negconv, n_drain);
    checks++;
    if (n_cin == 0 || n_cout == 0 || n_scale == 0 || n_round == 0 || n_negconv == 0 || n_drain == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
