// In-place sample memory of the sequential FFT.
//
// DEPTH complex words with two synchronous read ports and two write ports, so
// that one butterfly can fetch its two operands and store its two results
// every cycle. Read data appears one cycle after the address. The two write
// ports must not address the same word in one cycle (the FFT sequencer never
// does; an assertion checks it). Contents are not reset. The design
// description only implies a memory holding the samples between stages; the
// port structure is this design's choice.
module sample_ram
  import sm_fft_pkg::*;
#(
  parameter int unsigned LOGN = 10
) (
  input  logic            clk,
  input  logic [LOGN-1:0] ra0,
  input  logic [LOGN-1:0] ra1,
  output cplx_t           rd0,
  output cplx_t           rd1,
  input  logic            we0,
  input  logic [LOGN-1:0] wa0,
  input  cplx_t           wd0,
  input  logic            we1,
  input  logic [LOGN-1:0] wa1,
  input  cplx_t           wd1
);
  cplx_t mem [2**LOGN];

  always_ff @(posedge clk) begin
    if (we0) mem[wa0] <= wd0;
    if (we1) mem[wa1] <= wd1;
    rd0 <= mem[ra0];
    rd1 <= mem[ra1];
  end

  always_ff @(posedge clk) begin
    if (we0 && we1) begin
      a_no_write_clash: assert (wa0 != wa1)
        else $error("sample_ram: both write ports address word %0d", wa0);
    end
  end
endmodule
