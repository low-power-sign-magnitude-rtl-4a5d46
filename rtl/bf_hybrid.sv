// Retimed and pipelined hybrid radix-2 butterfly.
//
// Computes X0 = x0 + x1*W and X1 = x0 - x1*W on complex Q2.30 words.
// Multiplication is done in sign-magnitude: four unsigned Booth multipliers
// (ub_mult) take the magnitudes of x1 and of the twiddle factor W, and the
// product sign is the XOR of the operand signs. Addition is done in two's
// complement: each 62-bit product is converted by XORing it with its sign,
// and the "+sign" of the conversion is left to the carry-save adders of the
// output stage (bf_out_adder). The sign of the imaginary twiddle part going
// to the x1.im*W.im multiplier is inverted, so the real part is a sum
// instead of a difference. X1 uses the same converted rows with every bit
// and carry inverted, i.e. the negated products.
//
// Conversion of the operands is conditional. x1 is always multiplied and must
// arrive in sign-magnitude. x0 arrives in sign-magnitude in the first FFT
// stage (ctrl.cin = 1, converted to two's complement here) and in two's
// complement otherwise. The outputs are converted back to sign-magnitude only
// when the next stage multiplies them (ctrl.cout0 / ctrl.cout1), together with
// rounding (round_conv). ctrl.scale divides both outputs by two.
//
// Timing: one butterfly per cycle, latency 2. Stage 1 (multipliers, product
// converters, Cin) ends in the pipeline register placed after the converters;
// stage 2 (output adders, rounding, Cout) ends in the output register. out_*
// is valid two cycles after in_valid. Synchronous active-low reset clears the
// valid bits only. The structure follows the design description; the output
// register and the reset are this design's choices.
module bf_hybrid
  import sm_fft_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  cplx_t    x0,
  input  cplx_t    x1,     // sign-magnitude
  input  cplx_t    tw,     // sign-magnitude twiddle factor
  input  bf_ctrl_t ctrl,
  output logic     out_valid,
  output cplx_t    y0,
  output cplx_t    y1
);
  // ---------------- stage 1 ----------------
  logic [PW-1:0] p_rr, p_ii, p_ri, p_ir;
  logic          s_rr, s_ii, s_ri, s_ir;
  cplx_t         x0c;

  ub_mult #(.W(MW)) u_mrr (.a(x1.re[MW-1:0]), .b(tw.re[MW-1:0]), .p(p_rr));
  ub_mult #(.W(MW)) u_mii (.a(x1.im[MW-1:0]), .b(tw.im[MW-1:0]), .p(p_ii));
  ub_mult #(.W(MW)) u_mri (.a(x1.re[MW-1:0]), .b(tw.im[MW-1:0]), .p(p_ri));
  ub_mult #(.W(MW)) u_mir (.a(x1.im[MW-1:0]), .b(tw.re[MW-1:0]), .p(p_ir));

  assign s_rr = x1.re[DW-1] ^  tw.re[DW-1];
  assign s_ii = x1.im[DW-1] ^ ~tw.im[DW-1];   // sign change: -x1.im*tw.im
  assign s_ri = x1.re[DW-1] ^  tw.im[DW-1];
  assign s_ir = x1.im[DW-1] ^  tw.re[DW-1];

  sm_conv #(.W(DW)) u_cin_re (.x(x0.re), .sel(ctrl.cin), .y(x0c.re));
  sm_conv #(.W(DW)) u_cin_im (.x(x0.im), .sel(ctrl.cin), .y(x0c.im));

  // pipeline register after the product converters
  logic [PW:0] r_rr, r_ii, r_ri, r_ir;
  logic        rs_rr, rs_ii, rs_ri, rs_ir;
  cplx_t       r_x0;
  bf_ctrl_t    r_ctrl;
  logic        r_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
    end else begin
      r_valid <= in_valid;
    end
    r_rr   <= {1'b0, p_rr} ^ {(PW+1){s_rr}};
    r_ii   <= {1'b0, p_ii} ^ {(PW+1){s_ii}};
    r_ri   <= {1'b0, p_ri} ^ {(PW+1){s_ri}};
    r_ir   <= {1'b0, p_ir} ^ {(PW+1){s_ir}};
    rs_rr  <= s_rr;
    rs_ii  <= s_ii;
    rs_ri  <= s_ri;
    rs_ir  <= s_ir;
    r_x0   <= x0c;
    r_ctrl <= ctrl;
  end

  // ---------------- stage 2 ----------------
  logic [HW-1:0] h0re, h0im, h1re, h1im;
  logic          f0re, f0im, f1re, f1im;
  cplx_t         y0_d, y1_d;

  bf_out_adder u_add0re (.x0(r_x0.re), .pa(r_rr),  .sa(rs_rr),  .pb(r_ii),  .sb(rs_ii),  .hi(h0re), .f(f0re));
  bf_out_adder u_add0im (.x0(r_x0.im), .pa(r_ri),  .sa(rs_ri),  .pb(r_ir),  .sb(rs_ir),  .hi(h0im), .f(f0im));
  bf_out_adder u_add1re (.x0(r_x0.re), .pa(~r_rr), .sa(~rs_rr), .pb(~r_ii), .sb(~rs_ii), .hi(h1re), .f(f1re));
  bf_out_adder u_add1im (.x0(r_x0.im), .pa(~r_ri), .sa(~rs_ri), .pb(~r_ir), .sb(~rs_ir), .hi(h1im), .f(f1im));

  round_conv u_rc0re (.hi(h0re), .f(f0re), .scale(r_ctrl.scale), .conv(r_ctrl.cout0), .y(y0_d.re));
  round_conv u_rc0im (.hi(h0im), .f(f0im), .scale(r_ctrl.scale), .conv(r_ctrl.cout0), .y(y0_d.im));
  round_conv u_rc1re (.hi(h1re), .f(f1re), .scale(r_ctrl.scale), .conv(r_ctrl.cout1), .y(y1_d.re));
  round_conv u_rc1im (.hi(h1im), .f(f1im), .scale(r_ctrl.scale), .conv(r_ctrl.cout1), .y(y1_d.im));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= r_valid;
    end
    y0 <= y0_d;
    y1 <= y1_d;
  end
endmodule
