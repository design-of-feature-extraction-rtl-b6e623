// fft_fifos: the two FIFOs that connect the processor to the streaming FFT
// core.
//
// The Write-FIFO takes one frame of speech samples pushed by the processor
// (smp_push/smp_data, smp_full tells it to wait) and streams them into the
// FFT core whenever the core is ready (fft_in_valid/fft_in_ready). The FFT
// core streams its complex results, in natural order, into the Read-FIFO
// (fft_out_valid/fft_out_ready); the processor pops them (bin_pop, bin_data
// valid while bin_empty is low) to form magnitudes. The FFT core takes real
// input: the Write-FIFO holds the real part and fft_in_data carries it.
// Both sides of the core use valid/ready handshakes, as the document uses
// handshakes between FIFOs and core. Each FIFO holds one full frame
// (DEPTH = 256 words, the FFT length); the widths are this design's choice.
// A sample pushed at cycle t is offered to the core at cycle t+1.
module fft_fifos
  import mfcc_pkg::*;
#(
  parameter int unsigned DEPTH = N_BINS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // processor side, Write-FIFO
  input  logic                      smp_push,
  input  logic signed [SAMPLE_W-1:0] smp_data,
  output logic                      smp_full,
  output logic [$clog2(DEPTH):0]    wr_level,
  // FFT core input stream
  output logic                      fft_in_valid,
  input  logic                      fft_in_ready,
  output logic signed [SAMPLE_W-1:0] fft_in_data,
  // FFT core output stream
  input  logic                      fft_out_valid,
  output logic                      fft_out_ready,
  input  cplx_t                     fft_out_data,
  // processor side, Read-FIFO
  input  logic                      bin_pop,
  output cplx_t                     bin_data,
  output logic                      bin_empty,
  output logic [$clog2(DEPTH):0]    rd_level
);
  logic wr_s_ready, rd_m_valid;

  stream_fifo #(.W(SAMPLE_W), .DEPTH(DEPTH)) u_write_fifo (
    .clk, .rst_n,
    .s_valid (smp_push),   .s_ready (wr_s_ready), .s_data (smp_data),
    .m_valid (fft_in_valid), .m_ready (fft_in_ready), .m_data (fft_in_data),
    .level   (wr_level)
  );
  assign smp_full = !wr_s_ready;

  stream_fifo #(.W($bits(cplx_t)), .DEPTH(DEPTH)) u_read_fifo (
    .clk, .rst_n,
    .s_valid (fft_out_valid), .s_ready (fft_out_ready), .s_data (fft_out_data),
    .m_valid (rd_m_valid),    .m_ready (bin_pop),       .m_data (bin_data),
    .level   (rd_level)
  );
  assign bin_empty = !rd_m_valid;

  // The processor must not push into a full Write-FIFO or pop an empty Read-FIFO
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) smp_push |-> !smp_full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) bin_pop  |-> !bin_empty);

endmodule
