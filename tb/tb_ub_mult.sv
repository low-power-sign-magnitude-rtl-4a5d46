// Self-checking testbench of ub_mult, the unsigned radix-4 Booth multiplier.
// Drives corner values (zero, one, all ones, each digit pattern) and random
// operands of every bit length, and compares the product with the
// simulator's own multiplication.
module tb_ub_mult;
  localparam int unsigned W = 31;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p, expect_p;
  int checks = 0, failures = 0;

  ub_mult #(.W(W)) dut (.a, .b, .p);

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    a = ta;
    b = tb_;
    #1;
    expect_p = (2*W)'(ta) * (2*W)'(tb_);
    checks++;
    if (p !== expect_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", ta, tb_, p, expect_p);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ones;
    ones = '1;
    check(0, 0);
    check(1, 3);           // the 1x3 example: a single digit 3
    check(3, 1);
    check(ones, ones);
    check(ones, 1);
    check(1, ones);
    for (int d = 0; d < 4; d++)
      for (int g = 0; g < (W + 1) / 2; g++)
        check(W'($urandom), W'(d) << (2 * g));
    for (int i = 0; i < 3000; i++) begin
      int la, lb;
      la = 1 + $urandom_range(W - 1);
      lb = 1 + $urandom_range(W - 1);
      check(W'({$urandom, $urandom}) & (ones >> (W - la)),
            W'({$urandom, $urandom}) & (ones >> (W - lb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
