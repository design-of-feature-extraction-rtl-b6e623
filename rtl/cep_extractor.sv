// cep_extractor: cepstral coefficient extractor. Computes the 13 MFCCs of a
// frame as a 13 x 40 cosine matrix times the column of 40 log
// ear-magnitudes (Eq. 8-11), cep_i = 2/40 * sum_j x_j * m_ij.
//
// How it works: one counter j = 0..39 addresses the input data RAM (the log
// ear-magnitudes) and, at the same address, 13 cosine RAMs, one per
// coefficient. Every x_j is read once and broadcast to an array of 13 MACs,
// MAC i multiplying it by its own cosine m_ij. An enable/reset logic clears
// the MACs at start and enables them while products are valid. After the
// 40th product the 13 sums are scaled by 2/40 (multiply by 3277/2^16) and by
// the cosine format (COS_FRAC fraction bits), written together into the 13
// output registers, and the valid flag is raised. The flag stays high until
// the next start, so a processor can poll it.
//
// Interface: while idle, load the inputs with in_we/in_addr/in_data (signed,
// x 10000) and the cosines with cos_we/cos_sel/cos_addr/cos_data (signed,
// COS_FRAC fraction bits). A start pulse clears cep_valid and runs; busy is
// high during the run. Timing: start at cycle 0, the outputs and cep_valid
// change at the clock edge ending cycle NIN+2 (43 cycles for 40 inputs).
// cep[i] is cep_i scaled by 10000, for i = 0..12.
//
// The 13 parallel MACs, the single pass over the inputs, the stored cosines,
// the 2/40 factor and the output registers with a validity flag follow the
// document; widths, the cosine format and the timing are this design's own.
module cep_extractor
  import mfcc_pkg::*;
#(
  parameter int unsigned NIN  = N_FILT,
  parameter int unsigned NCEP = N_CEP,
  parameter int unsigned XW   = LOG_W,
  parameter int unsigned CW   = COS_W,
  parameter int unsigned CFR  = COS_FRAC,
  parameter int unsigned OW   = CEP_W,
  parameter int unsigned GAIN = DCT_GAIN_Q16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // input data RAM (log ear-magnitudes)
  input  logic                        in_we,
  input  logic [$clog2(NIN)-1:0]      in_addr,
  input  logic signed [XW-1:0]        in_data,
  // cosine RAMs
  input  logic                        cos_we,
  input  logic [$clog2(NCEP)-1:0]     cos_sel,
  input  logic [$clog2(NIN)-1:0]      cos_addr,
  input  logic signed [CW-1:0]        cos_data,
  // control
  input  logic                        start,
  output logic                        busy,
  // results
  output logic                        cep_valid,
  output logic signed [OW-1:0]        cep [NCEP]
);
  localparam int unsigned JW  = $clog2(NIN);
  localparam int unsigned SW  = $clog2(NCEP);
  localparam int unsigned ACW = XW + CW + JW;        // accumulator width

  logic signed [XW-1:0] in_ram  [NIN];
  logic signed [CW-1:0] cos_ram [NCEP][NIN];

  logic                 run, v1, fin;
  logic [JW-1:0]        j;
  logic signed [XW-1:0] x_q;
  logic signed [CW-1:0] c_q [NCEP];

  always_ff @(posedge clk) begin
    if (in_we && !busy) in_ram[in_addr] <= in_data;
    if (run) x_q <= in_ram[j];
  end

  for (genvar i = 0; i < NCEP; i++) begin : g_cos
    always_ff @(posedge clk) begin
      if (cos_we && !busy && cos_sel == SW'(i)) cos_ram[i][cos_addr] <= cos_data;
      if (run) c_q[i] <= cos_ram[i][j];
    end
  end

  // counter and enable/reset logic
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0;
      j   <= '0;
      v1  <= 1'b0;
      fin <= 1'b0;
    end else begin
      v1  <= run;
      fin <= v1 && !run;
      if (start && !busy) begin
        run <= 1'b1;
        j   <= '0;
      end else if (run) begin
        j <= j + 1'b1;
        if (j == JW'(NIN-1)) run <= 1'b0;
      end
    end
  end

  assign busy = run || v1 || fin;

  // MAC array
  logic signed [ACW-1:0] acc [NCEP];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NCEP; i++) acc[i] <= '0;
    end else if (start && !busy) begin
      for (int i = 0; i < NCEP; i++) acc[i] <= '0;
    end else if (v1) begin
      for (int i = 0; i < NCEP; i++) acc[i] <= acc[i] + ACW'(x_q * c_q[i]);
    end
  end

  // output registers: scale by 2/40 and the cosine format, then hold
  logic signed [ACW+17:0] scaled [NCEP];
  always_comb begin
    for (int i = 0; i < NCEP; i++)
      scaled[i] = ((ACW+18)'(acc[i]) * signed'((ACW+18)'(GAIN))) >>> (16 + CFR);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cep_valid <= 1'b0;
      for (int i = 0; i < NCEP; i++) cep[i] <= '0;
    end else begin
      if (start && !busy) cep_valid <= 1'b0;
      if (fin) begin
        cep_valid <= 1'b1;
        for (int i = 0; i < NCEP; i++) cep[i] <= OW'(scaled[i]);
      end
    end
  end

endmodule
