// Self-checking testbench of bf_out_adder, the output-stage adder. Random
// Q2.30 x0 values and signed 62-bit products are encoded the way the product
// converters present them (magnitude XOR sign, with the sign as the missing
// +1); the reference sum x0*2^30 + a + b is computed with plain signed
// 64-bit arithmetic and compared with the adder's upper bits and F. A
// quarter of the products have zero fraction bits, so that a lost +1 shows
// in the upper bits.
module tb_bf_out_adder;
  import sm_fft_pkg::*;
  word_t         x0;
  logic [PW:0]   pa, pb;
  logic          sa, sb;
  logic [HW-1:0] hi;
  logic          f;
  int checks = 0, failures = 0;

  bf_out_adder dut (.x0, .pa, .sa, .pb, .sb, .hi, .f);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint        ma, mb, sum;
    logic [SW-1:0] su;
    for (int i = 0; i < 4000; i++) begin
      x0 = $urandom;
      if (i % 3 == 0) x0 = word_t'($signed(x0) >>> $urandom_range(31));
      ma = longint'({$urandom, $urandom} & 64'h3FFF_FFFF_FFFF_FFFF) >>> $urandom_range(61);
      mb = longint'({$urandom, $urandom} & 64'h3FFF_FFFF_FFFF_FFFF) >>> $urandom_range(61);
      if (i % 4 == 1) begin
        // products with no fraction bits: any lost carry-in borrows into hi
        ma = ma & ~longint'((64'd1 << FRAC) - 1);
        mb = mb & ~longint'((64'd1 << FRAC) - 1);
      end
      sa = $urandom_range(1);
      sb = $urandom_range(1);
      pa = {1'b0, PW'(ma)} ^ {(PW+1){sa}};
      pb = {1'b0, PW'(mb)} ^ {(PW+1){sb}};
      #1;
      sum = (longint'($signed(x0)) <<< FRAC) + (sa ? -ma : ma) + (sb ? -mb : mb);
      su  = SW'(sum);
      checks++;
      if (hi !== su[SW-1:FRAC] || f !== su[FRAC-1]) begin
        failures++;
        if (failures < 10)
          $display("FAIL x0=%h a=%0d b=%0d hi=%h f=%b expected %h %b",
                   x0, sa ? -ma : ma, sb ? -mb : mb, hi, f, su[SW-1:FRAC], su[FRAC-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
