// Self-checking testbench of bf_hybrid, the pipelined hybrid butterfly.
//
// Random butterflies are fed with random gaps. x1 and the twiddle factor are
// sign-magnitude words (|W| <= 1); x0 is sign-magnitude when cin is set and
// two's complement otherwise; cout0, cout1 and scale are random. The
// reference computes X0 = x0 + x1*W and X1 = x0 - x1*W exactly with signed
// integers, cuts 30 (31 with scale) fraction bits by floor, adds the first
// cut bit to negative results and writes converted outputs in
// sign-magnitude. Outputs must appear exactly two cycles after their inputs.
module tb_bf_hybrid;
  import sm_fft_pkg::*;
  logic     clk = 0, rst_n = 0;
  logic     in_valid = 0;
  cplx_t    x0, x1, tw;
  bf_ctrl_t ctrl;
  logic     out_valid;
  cplx_t    y0, y1;
  int checks = 0, failures = 0, cycle = 0;

  bf_hybrid dut (.clk, .rst_n, .in_valid, .x0, .x1, .tw, .ctrl, .out_valid, .y0, .y1);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    cplx_t y0, y1;
    int    due;
  } exp_t;
  exp_t expq[$];

  function automatic longint sm_val(word_t w);
    return w[DW-1] ? -longint'(w[DW-2:0]) : longint'(w[DW-2:0]);
  endfunction

  function automatic word_t sm_enc(longint v);
    return (v < 0) ? {1'b1, MW'(-v)} : {1'b0, MW'(v)};
  endfunction

  // one output component from the exact sum s (Q.60)
  function automatic word_t ref_out(longint s, logic scale, logic conv);
    int     t;
    longint q, r;
    logic   fr;
    t  = FRAC + int'(scale);
    q  = s >>> t;
    fr = s[t-1];
    r  = longint'(int'(q));
    if (r < 0) r = r + longint'(fr);
    return (conv && r < 0) ? sm_enc(r) : word_t'(r);
  endfunction

  function automatic bit same(word_t got, word_t expv, logic conv);
    return got === expv || (conv && expv == 0 && got == 32'h8000_0000);
  endfunction

  function automatic word_t rand_sm(int maxbits);
    longint m;
    m = longint'($urandom) & ((64'd1 << maxbits) - 1);
    m = m >> $urandom_range(maxbits - 1);
    return {1'b0, MW'(m)} | {$urandom_range(1) == 1, {MW{1'b0}}};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive
  initial begin
    longint a, b, c, d, xr, xi, pr, pi;
    exp_t   e;
    x0 = '0; x1 = '0; tw = '0; ctrl = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      ctrl     = bf_ctrl_t'($urandom_range(15));
      x1.re    = rand_sm(29);
      x1.im    = rand_sm(29);
      tw.re    = rand_sm(30);
      tw.im    = rand_sm(30);
      if (i % 7 == 0) tw.re = {tw.re[DW-1], MW'(1 << FRAC)};   // |W| = 1
      if (i % 7 == 0) tw.im = {tw.im[DW-1], {MW{1'b0}}};
      x0.re    = rand_sm(29);
      x0.im    = rand_sm(29);
      if (!ctrl.cin) begin
        x0.re = word_t'(sm_val(x0.re));
        x0.im = word_t'(sm_val(x0.im));
      end
      if (in_valid) begin
        a  = sm_val(x1.re); b = sm_val(x1.im);
        c  = sm_val(tw.re); d = sm_val(tw.im);
        xr = ctrl.cin ? sm_val(x0.re) : longint'($signed(x0.re));
        xi = ctrl.cin ? sm_val(x0.im) : longint'($signed(x0.im));
        pr = a * c - b * d;
        pi = a * d + b * c;
        e.y0.re = ref_out((xr <<< FRAC) + pr, ctrl.scale, ctrl.cout0);
        e.y0.im = ref_out((xi <<< FRAC) + pi, ctrl.scale, ctrl.cout0);
        e.y1.re = ref_out((xr <<< FRAC) - pr, ctrl.scale, ctrl.cout1);
        e.y1.im = ref_out((xi <<< FRAC) - pi, ctrl.scale, ctrl.cout1);
        e.due   = cycle + 2;
        // store the control bits needed for the -0 rule alongside
        expq.push_back(e);
        ctrlq.push_back(ctrl);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bf_ctrl_t ctrlq[$];

  // check
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t     e;
      bf_ctrl_t c;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        e = expq.pop_front();
        c = ctrlq.pop_front();
        if (e.due != cycle) begin
          failures++;
          $display("FAIL latency: due %0d, seen %0d", e.due, cycle);
        end
        if (!(same(y0.re, e.y0.re, c.cout0) && same(y0.im, e.y0.im, c.cout0) &&
              same(y1.re, e.y1.re, c.cout1) && same(y1.im, e.y1.im, c.cout1))) begin
          failures++;
          if (failures < 10)
            $display("FAIL y0=%h/%h y1=%h/%h expected %h/%h %h/%h ctrl=%b", y0.re, y0.im,
                     y1.re, y1.im, e.y0.re, e.y0.im, e.y1.re, e.y1.im, c);
        end
      end
    end
  end
endmodule
