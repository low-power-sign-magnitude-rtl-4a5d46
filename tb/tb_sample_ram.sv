// Self-checking testbench of sample_ram. Random traffic on both write ports
// (never the same word twice in a cycle) and both read ports is checked
// against a shadow array kept by the testbench, including the one-cycle read
// latency and reads of a word written in the same cycle (old data).
module tb_sample_ram;
  import sm_fft_pkg::*;
  localparam int unsigned LOGN = 6;
  localparam int unsigned N    = 2 ** LOGN;
  logic            clk = 0;
  logic [LOGN-1:0] ra0, ra1, wa0, wa1;
  logic            we0, we1;
  cplx_t           rd0, rd1, wd0, wd1;
  cplx_t           shadow [N];
  int checks = 0, failures = 0;

  sample_ram #(.LOGN(LOGN)) dut (.clk, .ra0, .ra1, .rd0, .rd1, .we0, .wa0, .wd0, .we1, .wa1, .wd1);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cplx_t e0, e1;
    // fill every word through alternating ports
    for (int k = 0; k < N; k += 2) begin
      @(negedge clk);
      we0 = 1; wa0 = LOGN'(k);   wd0 = {$urandom, $urandom};
      we1 = 1; wa1 = LOGN'(k+1); wd1 = {$urandom, $urandom};
      ra0 = '0; ra1 = '0;
      shadow[k] = wd0;
      shadow[k+1] = wd1;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ra0 = LOGN'($urandom);
      ra1 = LOGN'($urandom);
      e0  = shadow[ra0];
      e1  = shadow[ra1];
      we0 = $urandom_range(1);
      we1 = $urandom_range(1);
      wa0 = LOGN'($urandom);
      wa1 = LOGN'($urandom);
      if (wa1 == wa0) wa1 = wa0 + 1'b1;
      wd0 = {$urandom, $urandom};
      wd1 = {$urandom, $urandom};
      if (we0) shadow[wa0] = wd0;
      if (we1) shadow[wa1] = wd1;
      @(posedge clk);
      #1;
      checks += 2;
      if (rd0 !== e0) begin
        failures++;
        if (failures < 10) $display("FAIL port 0 addr %0d: %h expected %h", ra0, rd0, e0);
      end
      if (rd1 !== e1) begin
        failures++;
        if (failures < 10) $display("FAIL port 1 addr %0d: %h expected %h", ra1, rd1, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
