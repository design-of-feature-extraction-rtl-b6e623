// mfcc_top: the hardware part of an MFCC (Mel-frequency cepstral
// coefficient) feature extractor for speech recognition, built to sit next
// to a processor that moves frames between memory and the accelerators.
//
// Data flow (one 256-sample frame):
//   1. The processor pushes the frame into the Write-FIFO (smp_*). The FIFO
//      streams it to an external 256-point FFT core (fft_in_*); the core's
//      complex output, in natural order, streams back into the Read-FIFO
//      (fft_out_*), from which the processor pops it (bin_*). The FFT core
//      itself is not part of this RTL: its two streams are ports.
//   2. The processor forms the magnitudes |X[b]| and writes them into the
//      ear-magnitude extractor (mag_*), which also holds the Mel filter
//      weights (coef_*) and the last bin of every filter (end_*). emag_start
//      runs the 40 filters on 5 shared MACs.
//   3. Each ear-magnitude goes straight through the logarithm unit. The log
//      ear-magnitudes leave on lem_* (for the processor to store) and, when
//      chain_en is high, are also written into the cepstral extractor's
//      input RAM; after the 40th the cepstral extractor starts by itself.
//      With chain_en low the processor loads that RAM (dct_*) and starts it
//      (dct_start) as a separate step.
//   4. The 13 coefficients appear together on cep[] with cep_valid set; the
//      flag stays until the next cepstral run starts.
//
// Timing with chain_en high: with emag_start at cycle 0 and e39 the last bin
// of filter 39, the last log ear-magnitude appears at cycle e39+5 and
// cep_valid rises at cycle e39+49 (177 for a Mel bank ending at bin 128).
// The split between processor and hardware follows the document; the
// direct chaining option (chain_en) and all handshakes are this design's own.
module mfcc_top
  import mfcc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // Write-FIFO, processor side
  input  logic                          smp_push,
  input  logic signed [SAMPLE_W-1:0]    smp_data,
  output logic                          smp_full,
  // FFT core streams (core outside this RTL)
  output logic                          fft_in_valid,
  input  logic                          fft_in_ready,
  output logic signed [SAMPLE_W-1:0]    fft_in_data,
  input  logic                          fft_out_valid,
  output logic                          fft_out_ready,
  input  cplx_t                         fft_out_data,
  // Read-FIFO, processor side
  input  logic                          bin_pop,
  output cplx_t                         bin_data,
  output logic                          bin_empty,
  // ear-magnitude extractor loading and control
  input  logic                          mag_we,
  input  logic [$clog2(N_BINS)-1:0]     mag_addr,
  input  logic [MAG_W-1:0]              mag_data,
  input  logic                          coef_we,
  input  logic [$clog2(N_MAC)-1:0]      coef_bank,
  input  logic [$clog2(N_BINS)-1:0]     coef_addr,
  input  logic [COEF_W-1:0]             coef_data,
  input  logic                          end_we,
  input  logic [$clog2(N_FILT)-1:0]     end_addr,
  input  logic [$clog2(N_BINS)-1:0]     end_data,
  input  logic                          emag_start,
  output logic                          emag_busy,
  // log ear-magnitudes
  output logic                          lem_valid,
  output logic [$clog2(N_FILT)-1:0]     lem_idx,
  output logic signed [LOG_W-1:0]       lem_data,
  // cepstral extractor loading and control
  input  logic                          chain_en,
  input  logic                          dct_we,
  input  logic [$clog2(N_FILT)-1:0]     dct_addr,
  input  logic signed [LOG_W-1:0]       dct_data,
  input  logic                          cos_we,
  input  logic [$clog2(N_CEP)-1:0]      cos_sel,
  input  logic [$clog2(N_FILT)-1:0]     cos_addr,
  input  logic signed [COS_W-1:0]       cos_data,
  input  logic                          dct_start,
  output logic                          dct_busy,
  output logic                          cep_valid,
  output logic signed [CEP_W-1:0]       cep [N_CEP]
);
  // ---------------- FFT interface FIFOs ----------------
  fft_fifos u_fifos (
    .clk, .rst_n,
    .smp_push, .smp_data, .smp_full, .wr_level (),
    .fft_in_valid, .fft_in_ready, .fft_in_data,
    .fft_out_valid, .fft_out_ready, .fft_out_data,
    .bin_pop, .bin_data, .bin_empty, .rd_level ()
  );

  // ---------------- ear-magnitude extractor ----------------
  logic                       emag_valid;
  logic [$clog2(N_FILT)-1:0]  emag_idx;
  logic [EMAG_W-1:0]          emag_data;

  emag_extractor u_emag (
    .clk, .rst_n,
    .in_we (mag_we), .in_addr (mag_addr), .in_data (mag_data),
    .coef_we, .coef_bank, .coef_addr, .coef_data,
    .end_we, .end_addr, .end_data,
    .start (emag_start), .busy (emag_busy), .done (),
    .emag_valid, .emag_idx, .emag_data
  );

  // ---------------- logarithm ----------------
  log_lut u_log (
    .clk, .rst_n,
    .in_valid (emag_valid), .in_tag (emag_idx), .in_data (emag_data),
    .out_valid (lem_valid), .out_tag (lem_idx), .out_data (lem_data)
  );

  // ---------------- cepstral extractor ----------------
  logic                             chain_wr;
  logic                             c_we;
  logic [$clog2(N_FILT)-1:0]        c_addr;
  logic signed [LOG_W-1:0]          c_data;
  logic                             c_start;

  assign chain_wr = chain_en && lem_valid;
  assign c_we     = chain_wr || dct_we;
  assign c_addr   = chain_wr ? lem_idx  : dct_addr;
  assign c_data   = chain_wr ? lem_data : dct_data;

  // start after the last log ear-magnitude has been written
  always_ff @(posedge clk) begin
    if (!rst_n) c_start <= 1'b0;
    else        c_start <= dct_start || (chain_wr && lem_idx == ($clog2(N_FILT))'(N_FILT-1));
  end

  cep_extractor u_cep (
    .clk, .rst_n,
    .in_we (c_we), .in_addr (c_addr), .in_data (c_data),
    .cos_we, .cos_sel, .cos_addr, .cos_data,
    .start (c_start), .busy (dct_busy),
    .cep_valid, .cep
  );

  // the processor must not write the cepstral input RAM while the chain does
  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n) !(chain_wr && dct_we));

endmodule
