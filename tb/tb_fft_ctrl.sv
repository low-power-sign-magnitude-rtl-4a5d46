// Self-checking testbench of fft_ctrl, the FFT sequencer. The reference walks
// the decimation-in-time schedule with three nested loops (stage, group,
// butterfly in group) and checks, for every issued butterfly, the two read
// addresses and the twiddle index, the conversion and scaling controls one
// cycle later, and the write addresses three cycles later. It also checks
// the inter-stage drains and the busy time L*(2^L/2 + 3), for transforms of
// 2^10, 2^9 (the Doppler size) and 2^3 bins run back to back.
module tb_fft_ctrl;
  import sm_fft_pkg::*;
  localparam int unsigned LOGN = 10;
  localparam int unsigned N    = 2 ** LOGN;
  localparam int unsigned LW   = $clog2(LOGN + 1);
  logic            clk = 0, rst_n = 0, start = 0;
  logic [LW-1:0]   logn = LW'(LOGN);
  logic            busy, done, draining, rd_en, bf_valid, wr_en;
  logic [LOGN-1:0] ra0, ra1, wa0, wa1;
  logic [LOGN-2:0] tw_addr;
  bf_ctrl_t        bf_ctrl;
  int checks = 0, failures = 0, cycle = 0;

  fft_ctrl #(.LOGN(LOGN)) dut (.clk, .rst_n, .start, .logn, .busy, .done, .draining, .rd_en,
    .ra0, .ra1, .tw_addr, .bf_valid, .bf_ctrl, .wr_en, .wa0, .wa1);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    int       i0, i1, tw;
    bf_ctrl_t c;
  } bfly_t;
  bfly_t sched[$];
  bfly_t ctrlq[$];
  bfly_t wrq[$];

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build_schedule(input int L);
    bfly_t b;
    for (int s = 0; s < L; s++) begin
      int h = 1 << s;
      for (int g = 0; g < (1 << L) / (2 * h); g++)
        for (int j = 0; j < h; j++) begin
          b.i0 = g * 2 * h + j;
          b.i1 = b.i0 + h;
          b.tw = j * (N / (2 * h));
          b.c.cin   = (s == 0);
          b.c.cout0 = (s < L - 1) && (((b.i0 >> (s + 1)) & 1) == 1);
          b.c.cout1 = (s < L - 1) && (((b.i1 >> (s + 1)) & 1) == 1);
          b.c.scale = (s % 2 == 1);
          sched.push_back(b);
        end
    end
  endtask

  int drains = 0, busy_cycles = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      bfly_t e;
      if (draining) drains++;
      if (busy) busy_cycles++;
      if (rd_en) begin
        checks++;
        if (sched.size() == 0) fail("issue beyond the schedule");
        else begin
          e = sched.pop_front();
          if (ra0 != e.i0 || ra1 != e.i1 || tw_addr != e.tw)
            fail($sformatf("issue %0d/%0d tw %0d, expected %0d/%0d tw %0d",
                           ra0, ra1, tw_addr, e.i0, e.i1, e.tw));
          ctrlq.push_back(e);
        end
      end
      if (bf_valid) begin
        checks++;
        if (ctrlq.size() == 0) fail("bf_valid without issue");
        else begin
          e = ctrlq.pop_front();
          if (bf_ctrl != e.c) fail($sformatf("ctrl %b expected %b", bf_ctrl, e.c));
          wrq.push_back(e);
        end
      end
      if (wr_en) begin
        checks++;
        if (wrq.size() == 0) fail("write without butterfly");
        else begin
          e = wrq.pop_front();
          if (wa0 != e.i0 || wa1 != e.i1) fail("write address");
        end
      end
    end
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 3; run++) begin
      int L;
      L = (run == 0) ? LOGN : (run == 1) ? LOGN - 1 : 3;
      build_schedule(L);
      logn = LW'(L);
      drains = 0;
      busy_cycles = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      t0 = cycle;
      while (!done) @(posedge clk);
      #1;
      checks++;
      if (busy_cycles != L * ((1 << L) / 2 + 3) || cycle - t0 > busy_cycles + 1)
        fail($sformatf("transform took %0d cycles, expected %0d", busy_cycles, L * ((1 << L) / 2 + 3)));
      checks++;
      if (drains != 3 * L) fail($sformatf("%0d drain cycles", drains));
      checks++;
      if (sched.size() != 0 || ctrlq.size() != 0 || wrq.size() != 0) fail("schedule not completed");
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
