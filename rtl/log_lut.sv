// log_lut: natural logarithm of an unsigned integer, scaled by 10000, using
// a leading-one detector and a 256-entry look-up table.
//
// How it works: any a > 0 is written a = 2^p * N with 0.5 <= N < 1, so that
// ln(a) = (p + log2(N)) * ln(2). p is one more than the position of the most
// significant 1 of a. The 8 bits just below that leading 1 give the LUT
// index (N - 0.5) / (0.5/256); the LUT, a single-port ROM, holds
// round(10000 * log2(0.5 + i/512)) for i = 0..255. The unit forms
// p*10000 + LUT[index], multiplies by ln(2) (as 45426 / 2^16) and subtracts
// CORR, the correction for filter weights that were scaled by 10000. The
// document states this correction as "subtract 4" (x 10000 = 40000), which
// is the exact value for a base-10 logarithm; CORR defaults to that number.
// An input of 0 is treated as 1 (its logarithm is taken as 0 before the
// correction).
//
// Interface: in_valid/in_tag/in_data in, out_valid/out_tag/out_data out,
// two cycles later (one cycle for the ROM read, one for the arithmetic);
// a new input may be taken every cycle. in_tag travels alongside (for
// example the filter number). out_data is signed.
//
// The LUT method, its 256-entry size, the 10000 scaling, the single-port
// ROM and the subtract-4 correction follow the document; the word widths,
// the ln(2) constant's precision, the pipeline and the zero input are this
// design's own choices. The table is read from rtl/log2_lut.hex (paths are
// relative to the project root).
module log_lut
  import mfcc_pkg::*;
#(
  parameter int unsigned IW    = EMAG_W,
  parameter int unsigned OW    = LOG_W,
  parameter int unsigned TW    = $clog2(N_FILT),
  parameter int          CORR  = LOG_CORR,
  parameter              LUT_FILE = "rtl/log2_lut.hex"
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [TW-1:0]        in_tag,
  input  logic [IW-1:0]        in_data,
  output logic                 out_valid,
  output logic [TW-1:0]        out_tag,
  output logic signed [OW-1:0] out_data
);
  localparam int unsigned PBW = $clog2(IW + 1);   // holds p = 1..IW

  // single-port ROM: log2(0.5 + i/512) x 10000
  logic signed [15:0] rom [256];
  initial $readmemh(LUT_FILE, rom);

  // ---------- stage 0: leading-one detection and index ----------
  logic [IW-1:0]  a;
  logic [PBW-1:0] msb;
  logic [IW-1:0]  norm;
  logic [7:0]     idx;

  always_comb begin
    a   = (in_data == '0) ? IW'(1) : in_data;
    msb = '0;
    for (int i = 0; i < IW; i++) if (a[i]) msb = PBW'(i);
    norm = a << (IW - 1 - int'(msb));     // leading 1 moved to the top bit
    idx  = norm[IW-2 -: 8];
  end

  logic                 v1;
  logic [TW-1:0]        tag1;
  logic [PBW-1:0]       p1;
  logic signed [15:0]   lut1;

  always_ff @(posedge clk) begin
    lut1 <= rom[idx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      tag1 <= '0;
      p1   <= '0;
    end else begin
      v1   <= in_valid;
      tag1 <= in_tag;
      p1   <= msb + 1'b1;
    end
  end

  // ---------- stage 1: (p + log2 N) * ln 2 - correction ----------
  logic signed [31:0] s;
  logic signed [63:0] y;

  always_comb begin
    s = 32'(int'(p1) * int'(LOG_SCALE)) + 32'(lut1);
    y = (64'(s) * signed'(64'(LN2_Q16))) >>> 16;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= v1;
      out_tag   <= tag1;
      out_data  <= OW'(y - 64'(CORR));
    end
  end

endmodule
