// Sequencer of an N-bin radix-2 FFT computed on one butterfly.
//
// Runs the decimation-in-time FFT in place over L stages of 2^L/2
// butterflies, one butterfly issued per cycle. L is given on logn with start
// (1 <= L <= LOGN), so one instance does, for example, both 1024-bin range
// and 512-bin Doppler transforms; the twiddle index does not depend on L. The samples must have been
// stored in bit-reversed order; the results then come out in natural order.
// In stage s (span h = 2^s) butterfly b works on
//   i0 = ((b >> s) << (s+1)) | (b mod h),  i1 = i0 + h,
// with twiddle factor W_N^((b mod h) * N / 2h).
//
// It also generates the three conversion controls of every butterfly and the
// scaling control:
//   cin   = 1 in stage 0 only, where every word is still in sign-magnitude;
//   cout0 = cout1 = bit s+1 of i0 (the two outputs are x1 operands in stage
//           s+1 exactly when that bit is set); 0 in stage L-1, so the
//           results end in two's complement;
//   scale = 1 in stages 1, 3, 5, ... (division by two every second stage,
//           sqrt(2^L) in all for even L).
//
// Timing: start (one cycle, while idle) begins a transform; busy stays high
// until done pulses. Read addresses and the twiddle address are issued in the
// cycle of the butterfly; memory and ROM answer one cycle later, when
// bf_valid/bf_ctrl are presented; the butterfly results are written
// PIPE = 3 cycles after issue. Between stages the sequencer stalls PIPE cycles
// (the drain) so that stage s+1 only reads words stage s has written. One
// transform keeps busy high for L*(2^L/2 + PIPE) cycles.
// The address pattern, conversion rule and scaling follow the design
// description; issue rate, drain, handshake and the run-time size are this
// design's choices.
module fft_ctrl
  import sm_fft_pkg::*;
#(
  parameter int unsigned LOGN = 10,
  localparam int unsigned LW  = $clog2(LOGN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [LW-1:0]   logn,       // stages of this transform, 1..LOGN
  output logic            busy,
  output logic            done,
  output logic            draining,   // high during an inter-stage stall
  // read side (issue cycle)
  output logic            rd_en,
  output logic [LOGN-1:0] ra0,
  output logic [LOGN-1:0] ra1,
  output logic [LOGN-2:0] tw_addr,
  // butterfly side (one cycle after issue)
  output logic            bf_valid,
  output bf_ctrl_t        bf_ctrl,
  // write side (PIPE cycles after issue)
  output logic            wr_en,
  output logic [LOGN-1:0] wa0,
  output logic [LOGN-1:0] wa1
);
  localparam int unsigned PIPE = 3;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t          state;
  logic [LW-1:0]   stage;
  logic [LW-1:0]   nst;      // number of stages, latched at start
  logic [LOGN-2:0] bmax;     // last butterfly index of a stage
  logic [LOGN-2:0] bidx;
  logic [1:0]      dcnt;

  logic [LOGN-1:0] span, lowmask, i0;
  bf_ctrl_t        ctrl_now;

  always_comb begin
    span    = LOGN'(1) << stage;
    lowmask = span - 1'b1;
    i0      = ((LOGN'(bidx) & ~lowmask) << 1) | (LOGN'(bidx) & lowmask);
    ra0     = i0;
    ra1     = i0 | span;
    tw_addr = (LOGN-1)'((LOGN'(bidx) & lowmask) << (LOGN - 1 - int'(stage)));
    rd_en   = (state == S_RUN);
    bmax    = (LOGN-1)'(({{(LOGN-1){1'b0}}, 1'b1} << (nst - 1'b1)) - 1'b1);
    ctrl_now.cin   = (stage == '0);
    ctrl_now.cout0 = (stage + 1'b1 < nst) ? i0[(int'(stage) + 1) % LOGN] : 1'b0;
    ctrl_now.cout1 = ctrl_now.cout0;
    ctrl_now.scale = stage[0];
  end

  assign busy     = (state != S_IDLE);
  assign draining = (state == S_DRAIN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      stage <= '0;
      nst   <= LW'(LOGN);
      bidx  <= '0;
      dcnt  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          stage <= '0;
          nst   <= logn;
          bidx  <= '0;
        end
        S_RUN: begin
          bidx <= bidx + 1'b1;
          if (bidx == bmax) begin
            bidx  <= '0;
            state <= S_DRAIN;
            dcnt  <= 2'(PIPE - 1);
          end
        end
        S_DRAIN: begin
          dcnt <= dcnt - 1'b1;
          if (dcnt == '0) begin
            if (stage + 1'b1 == nst) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_RUN;
              stage <= stage + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // delay line from issue to butterfly input and to write-back
  logic     v_q [PIPE];
  logic [LOGN-1:0] a0_q [PIPE];
  logic [LOGN-1:0] a1_q [PIPE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < PIPE; k++) v_q[k] <= 1'b0;
    end else begin
      v_q[0] <= rd_en;
      for (int k = 1; k < PIPE; k++) v_q[k] <= v_q[k-1];
    end
    a0_q[0] <= ra0;
    a1_q[0] <= ra1;
    for (int k = 1; k < PIPE; k++) begin
      a0_q[k] <= a0_q[k-1];
      a1_q[k] <= a1_q[k-1];
    end
    bf_ctrl <= ctrl_now;
  end

  assign bf_valid = v_q[0];
  assign wr_en    = v_q[PIPE-1];
  assign wa0      = a0_q[PIPE-1];
  assign wa1      = a1_q[PIPE-1];
endmodule
