// Self-checking testbench of round_conv, the merged rounding and conditional
// conversion. The reference takes the floor value, optionally halves it,
// adds the fraction bit to negative results, and writes negative results in
// sign-magnitude when conversion is asked for. A zero reached by rounding a
// negative value may come out as -0, which is accepted as zero.
module tb_round_conv;
  import sm_fft_pkg::*;
  logic [HW-1:0] hi;
  logic          f, scale, conv;
  word_t         y;
  int checks = 0, failures = 0;
  int n_round = 0, n_conv = 0;

  round_conv dut (.hi, .f, .scale, .conv, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint q, r;
    logic   fr;
    int     q32;
    word_t  exp_y;
    for (int i = 0; i < 4000; i++) begin
      hi    = HW'({$urandom, $urandom});
      if (i % 2 == 0) hi = HW'($signed(hi) >>> $urandom_range(33));
      f     = $urandom_range(1);
      scale = $urandom_range(1);
      conv  = $urandom_range(1);
      #1;
      q   = longint'($signed(hi));
      fr  = f;
      if (scale) begin
        fr = hi[0];
        q  = q >>> 1;
      end
      q32 = int'(q);             // the stored word keeps 32 bits
      r   = longint'(q32);
      if (r < 0) begin
        r = r + longint'(fr);
        if (fr) n_round++;
      end
      if (conv && r < 0) begin
        exp_y = {1'b1, MW'(-r)};
        n_conv++;
      end else begin
        exp_y = word_t'(r);
      end
      checks++;
      if (!(y === exp_y || (exp_y == 0 && conv && y == 32'h8000_0000))) begin
        failures++;
        if (failures < 10)
          $display("FAIL hi=%h f=%b scale=%b conv=%b y=%h expected %h", hi, f, scale, conv, y, exp_y);
      end
    end
    if (n_round == 0 || n_conv == 0) failures++;
    $display("rounding events %0d, conversions %0d", n_round, n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
