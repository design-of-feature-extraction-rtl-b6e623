// emag_extractor: ear-magnitude extractor. Applies the 40 triangular Mel
// band-pass filters to one frame of 256 FFT magnitudes (Eq. 2: a 40 x 256
// sparse weight matrix times the magnitude column) with only 5 MACs.
//
// How it works: filter k (0-based) is always computed on MAC k mod 5, so
// MAC 0 serves filters 0, 5, 10, ... 35, MAC 1 serves 1, 6, ... 36, and so
// on, as the document describes. Because the triangles are ordered along the
// frequency axis, the filters that share one MAC never overlap, so each MAC
// has one coefficient bank of N_BINS words: word b of bank m holds the weight
// at bin b of whichever of its filters covers b, and zero elsewhere. A bin
// counter walks b = 0..N_BINS-1 and reads, every cycle, the magnitude a[b]
// from the input data RAM and the 5 weights; all 5 MACs accumulate in
// parallel. A small table holds the last bin of every filter; when the bin
// being accumulated is the last bin of the next filter k in line, the
// select logic routes MAC k mod 5 (its sum including this bin) through the
// output multiplexer and that MAC restarts from zero for filter k+5. The
// ear-magnitudes therefore leave in filter order, one per valid pulse.
//
// Requirements on the loaded filter bank (checked by assertions):
// last bins strictly increasing, and filter k+5 has no non-zero weight at
// or before the last bin of filter k.
//
// Interface: while idle, the processor writes the magnitude frame
// (in_we/in_addr/in_data), the 5 coefficient banks (coef_we/coef_bank/
// coef_addr/coef_data, weights scaled by 10000) and the last-bin table
// (end_we/end_addr/end_data). A start pulse runs one frame; busy is high
// during the run. Results appear on emag_valid/emag_idx/emag_data.
// Timing: with start at cycle 0, bin b is accumulated at cycle b+2 and a
// filter ending at bin b is output (registered) at cycle b+3; done pulses at
// cycle N_BINS+2, one frame takes N_BINS+3 cycles from start to idle.
//
// The 5-MAC sharing, the 256 x 40 sizes, the counter/enable/select/mux
// structure and the 10000 weight scaling follow the document; the last-bin
// table, the bank layout, widths and the exact timing are this design's own.
module emag_extractor
  import mfcc_pkg::*;
#(
  parameter int unsigned NBINS  = N_BINS,
  parameter int unsigned NFILT  = N_FILT,
  parameter int unsigned NMAC   = N_MAC,
  parameter int unsigned DW     = MAG_W,
  parameter int unsigned CW     = COEF_W,
  parameter int unsigned AW_OUT = EMAG_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // input data RAM write port (magnitudes)
  input  logic                         in_we,
  input  logic [$clog2(NBINS)-1:0]     in_addr,
  input  logic [DW-1:0]                in_data,
  // filter coefficient bank write port
  input  logic                         coef_we,
  input  logic [$clog2(NMAC)-1:0]      coef_bank,
  input  logic [$clog2(NBINS)-1:0]     coef_addr,
  input  logic [CW-1:0]                coef_data,
  // last-bin table write port
  input  logic                         end_we,
  input  logic [$clog2(NFILT)-1:0]     end_addr,
  input  logic [$clog2(NBINS)-1:0]     end_data,
  // control
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // ear-magnitude output stream
  output logic                         emag_valid,
  output logic [$clog2(NFILT)-1:0]     emag_idx,
  output logic [AW_OUT-1:0]            emag_data
);
  localparam int unsigned BW = $clog2(NBINS);
  localparam int unsigned FW = $clog2(NFILT);
  localparam int unsigned MW = $clog2(NMAC);
  localparam int unsigned PW = DW + CW;

  // ---------------- memories ----------------
  logic [DW-1:0] in_ram   [NBINS];
  logic [CW-1:0] coef_ram [NMAC][NBINS];
  logic [BW-1:0] end_tab  [NFILT];

  logic [DW-1:0] a_q;
  logic [CW-1:0] c_q [NMAC];

  // ---------------- counter ----------------
  logic          run;        // stage 0: bin counter active
  logic [BW-1:0] bin;
  logic          v1;         // stage 1: product valid
  logic [BW-1:0] bin1;

  always_ff @(posedge clk) begin
    if (in_we && !busy) in_ram[in_addr] <= in_data;
    if (run) a_q <= in_ram[bin];
  end

  for (genvar m = 0; m < NMAC; m++) begin : g_bank
    always_ff @(posedge clk) begin
      if (coef_we && !busy && coef_bank == MW'(m)) coef_ram[m][coef_addr] <= coef_data;
      if (run) c_q[m] <= coef_ram[m][bin];
    end
  end

  always_ff @(posedge clk) begin
    if (end_we && !busy) end_tab[end_addr] <= end_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      bin  <= '0;
      v1   <= 1'b0;
      bin1 <= '0;
    end else begin
      v1   <= run;
      bin1 <= bin;
      if (start && !busy) begin
        run <= 1'b1;
        bin <= '0;
      end else if (run) begin
        bin <= bin + 1'b1;
        if (bin == BW'(NBINS-1)) run <= 1'b0;
      end
    end
  end

  // ---------------- MAC array, enable and select logic ----------------
  logic [AW_OUT-1:0] acc [NMAC];
  logic [PW-1:0]     prod [NMAC];
  logic [FW-1:0]     kf;        // next filter to finish
  logic [MW-1:0]     ksel;      // kf mod NMAC: MAC selected by the multiplexer
  logic              kdone;     // all filters already output
  logic              fin;       // filter kf finishes on this bin

  always_comb begin
    for (int m = 0; m < NMAC; m++) prod[m] = PW'(a_q) * PW'(c_q[m]);
  end

  assign fin = v1 && !kdone && (end_tab[kf] == bin1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < NMAC; m++) acc[m] <= '0;
      kf         <= '0;
      ksel       <= '0;
      kdone      <= 1'b0;
      emag_valid <= 1'b0;
      emag_idx   <= '0;
      emag_data  <= '0;
    end else begin
      emag_valid <= 1'b0;
      if (start && !busy) begin
        for (int m = 0; m < NMAC; m++) acc[m] <= '0;
        kf    <= '0;
        ksel  <= '0;
        kdone <= 1'b0;
      end else if (v1) begin
        for (int m = 0; m < NMAC; m++) begin
          if (fin && ksel == MW'(m)) acc[m] <= '0;          // reset for filter kf+NMAC
          else                       acc[m] <= acc[m] + AW_OUT'(prod[m]);
        end
        if (fin) begin
          emag_valid <= 1'b1;
          emag_idx   <= kf;
          emag_data  <= acc[ksel] + AW_OUT'(prod[ksel]);
          if (kf == FW'(NFILT-1)) kdone <= 1'b1;
          else                    kf    <= kf + 1'b1;
          ksel <= (ksel == MW'(NMAC-1)) ? '0 : ksel + 1'b1;
        end
      end
    end
  end

  assign busy = run || v1;

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else        done <= v1 && !run;
  end

  // Last bins must be strictly increasing: no two filters finish on one bin
  a_one_finish: assert property (@(posedge clk) disable iff (!rst_n)
    (fin && kf != FW'(NFILT-1)) |-> (end_tab[kf + 1'b1] != bin1));
  // Every filter is output by the time the last bin has been accumulated
  a_all_out: assert property (@(posedge clk) disable iff (!rst_n)
    (v1 && !run) |-> (kdone || fin && kf == FW'(NFILT-1)));

endmodule
