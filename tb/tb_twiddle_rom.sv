// Self-checking testbench of twiddle_rom. Reads every entry and compares it
// with cos(2*pi*k/N) and -sin(2*pi*k/N) evaluated in the testbench: the
// magnitude must be within one LSB of the Q2.30 value, the sign bit must be
// set exactly for negative values, and W^0 must be exactly 1. Also checks
// the one-cycle read latency.
module tb_twiddle_rom;
  import sm_fft_pkg::*;
  localparam int unsigned LOGN = 10;
  localparam int unsigned NT   = 2 ** (LOGN - 1);
  logic            clk = 0;
  logic [LOGN-2:0] addr = '0;
  cplx_t           tw;
  int checks = 0, failures = 0;

  twiddle_rom #(.LOGN(LOGN)) dut (.clk, .addr, .tw);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(word_t w, real v);
    real m, e;
    m = real'(w[DW-2:0]) / 1073741824.0;
    if (w[DW-1]) m = -m;
    e = m - v;
    if (e < 0.0) e = -e;
    return (e <= 1.0 / 1073741824.0) && (w[DW-1] == (v < -0.5 / 1073741824.0));
  endfunction

  initial begin
    real ang;
    for (int k = 0; k < NT; k++) begin
      @(negedge clk);
      addr = (LOGN-1)'(k);
      @(posedge clk);
      #1;
      ang = 2.0 * 3.14159265358979323846 * k / (2.0 * NT);
      checks++;
      if (!close(tw.re, $cos(ang)) || !close(tw.im, -$sin(ang))) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d tw=%h/%h", k, tw.re, tw.im);
      end
    end
    checks++;
    @(negedge clk);
    addr = '0;
    @(posedge clk);
    #1;
    if (tw.re !== 32'h4000_0000 || tw.im !== 32'h0) begin
      failures++;
      $display("FAIL W^0 = %h/%h", tw.re, tw.im);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
