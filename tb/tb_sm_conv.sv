// Self-checking testbench of sm_conv, the conditional converter between
// sign-magnitude and two's complement. The reference is computed with signed
// integer arithmetic: a sign-magnitude word s|m stands for -m or +m.
module tb_sm_conv;
  localparam int unsigned W = 32;
  logic [W-1:0] x, y;
  logic         sel;
  int checks = 0, failures = 0;

  sm_conv #(.W(W)) dut (.x, .sel, .y);

  function automatic logic [W-1:0] sm2tc(logic [W-1:0] v);
    longint m;
    m = longint'(v[W-2:0]);
    return v[W-1] ? W'(-m) : W'(m);
  endfunction

  function automatic logic [W-1:0] tc2sm(logic [W-1:0] v);
    longint s;
    s = longint'($signed(v));
    return (s < 0) ? {1'b1, (W-1)'(-s)} : v;
  endfunction

  task automatic check(input logic [W-1:0] tx, input logic tsel, input logic [W-1:0] exp_y);
    x   = tx;
    sel = tsel;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h sel=%b y=%h expected %h", tx, tsel, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    check(32'h8000_0000, 1'b1, 32'h0);            // -0 becomes 0
    check(32'h0000_0000, 1'b1, 32'h0);
    check(32'h8000_0005, 1'b1, 32'hFFFF_FFFB);    // -5
    check(32'hFFFF_FFFB, 1'b1, 32'h8000_0005);    // and back
    for (int i = 0; i < 2000; i++) begin
      v = $urandom;
      if (i % 2 == 0) v[W-2:0] = v[W-2:0] >> $urandom_range(30);  // small values
      check(v, 1'b0, v);                            // pass-through
      check(v, 1'b1, sm2tc(v));                     // SM -> 2C
      if (v != {1'b1, {(W-1){1'b0}}}) check(v, 1'b1, tc2sm(v));  // 2C -> SM
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
