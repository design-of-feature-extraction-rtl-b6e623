// tb_utterance: workload test. Runs half a second of synthetic speech
// (8000 Hz, 4000 samples: a vowel-like harmonic series whose pitch and
// formants glide, plus noise) through the complete chain at full size, as
// frames of 256 samples with a hop of 128 (50 % overlap), 30 frames in all.
// The testbench acts as the processor (frame blocking, magnitudes) and a
// behavioural model stands in for the FFT core. The DCT is chained
// (chain_en = 1).
//
// For every frame the 13 hardware MFCCs are compared with a floating-point
// MFCC computed here from the same magnitudes: unrounded triangular weights,
// exact ln, exact DCT. The fixed-point path adds a constant to every log
// ear-magnitude (ln 10000 from the weight scaling minus the subtracted 4),
// which moves only coefficient 0; coefficients 1..12 must agree within
// 0.01, coefficient 0 within 0.01 after removing that known offset.
// It also reports the cycles each frame spends in the accelerators.
module tb_utterance;
  import mfcc_pkg::*;
  import mfcc_tb_pkg::*;

  localparam int NSAMP = 4000;
  localparam int HOP   = 128;
  localparam int NFRM  = (NSAMP - N_BINS) / HOP + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       smp_push, smp_full;
  logic signed [SAMPLE_W-1:0] smp_data;
  logic                       fft_in_valid, fft_in_ready;
  logic signed [SAMPLE_W-1:0] fft_in_data;
  logic                       fft_out_valid, fft_out_ready;
  cplx_t                      fft_out_data;
  logic                       bin_pop, bin_empty;
  cplx_t                      bin_data;
  logic                       mag_we, coef_we, end_we, emag_start, emag_busy;
  logic [7:0]                 mag_addr, coef_addr, end_data;
  logic [MAG_W-1:0]           mag_data;
  logic [2:0]                 coef_bank;
  logic [COEF_W-1:0]          coef_data;
  logic [5:0]                 end_addr;
  logic                       lem_valid;
  logic [5:0]                 lem_idx;
  logic signed [LOG_W-1:0]    lem_data;
  logic                       chain_en, dct_we, cos_we, dct_start, dct_busy, cep_valid;
  logic [5:0]                 dct_addr, cos_addr;
  logic signed [LOG_W-1:0]    dct_data;
  logic [3:0]                 cos_sel;
  logic signed [COS_W-1:0]    cos_data;
  logic signed [CEP_W-1:0]    cep [N_CEP];

  mfcc_top dut (.*);

  fft256_model u_fft (
    .clk, .rst_n,
    .s_valid (fft_in_valid), .s_ready (fft_in_ready), .s_data (fft_in_data),
    .m_valid (fft_out_valid), .m_ready (fft_out_ready), .m_data (fft_out_data)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  coef_mat_t   w;
  end_tab_t    e;
  int          speech [NSAMP];
  int unsigned mag [N_BINS];
  real         wr [N_FILT][N_BINS];   // unrounded weights

  // the same bank as mel_bank(), without the x10000 rounding
  task automatic real_bank();
    real edge_bin [N_FILT+2];
    real top;
    top = mel(4000.0);
    for (int i = 0; i < N_FILT + 2; i++)
      edge_bin[i] = imel(top * i / (N_FILT + 1)) / 8000.0 * N_BINS;
    for (int k = 0; k < N_FILT; k++) begin
      real l, c, r, h;
      l = edge_bin[k]; c = edge_bin[k+1]; r = edge_bin[k+2]; h = 2.0 / (r - l);
      for (int b = 0; b < N_BINS; b++) begin
        wr[k][b] = 0.0;
        if (b > l && b <= c)     wr[k][b] = h * (b - l) / (c - l);
        else if (b > c && b < r) wr[k][b] = h * (r - b) / (r - c);
      end
    end
  endtask

  task automatic make_speech();
    real ph0 = 0.0;
    for (int t = 0; t < NSAMP; t++) begin
      real f0, v, pos;
      pos = real'(t) / NSAMP;
      f0  = 110.0 + 90.0 * pos;                    // pitch glide
      ph0 += 2.0 * 3.14159265358979 * f0 / 8000.0;
      v = 0.0;
      for (int hm = 1; hm <= 25; hm++) begin
        real fh, g;
        fh = hm * f0;
        if (fh < 3900.0) begin
          // two formants that move over the utterance
          g = 1.0 / (1.0 + ((fh - (500.0 + 300.0 * pos)) / 150.0) ** 2)
            + 0.6 / (1.0 + ((fh - (1800.0 - 600.0 * pos)) / 200.0) ** 2);
          v += g * $sin(hm * ph0);
        end
      end
      speech[t] = int'($rtoi(4000.0 * v)) + int'($urandom % 301) - 150;
      if (speech[t] > 32767) speech[t] = 32767;
      if (speech[t] < -32768) speech[t] = -32768;
    end
  endtask

  initial begin
    int t_start, t_emag, hw_cycles, max_hw = 0, max_frame = 0;
    real worst = 0.0;
    smp_push = 0; smp_data = 0; bin_pop = 0;
    mag_we = 0; mag_addr = 0; mag_data = 0;
    coef_we = 0; coef_bank = 0; coef_addr = 0; coef_data = 0;
    end_we = 0; end_addr = 0; end_data = 0; emag_start = 0;
    chain_en = 1; dct_we = 0; dct_addr = 0; dct_data = 0;
    cos_we = 0; cos_sel = 0; cos_addr = 0; cos_data = 0; dct_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    mel_bank(w, e);
    real_bank();
    make_speech();
    @(negedge clk);
    for (int k = 0; k < N_FILT; k++) begin
      end_we = 1; end_addr = 6'(k); end_data = 8'(e[k]);
      @(negedge clk);
    end
    end_we = 0;
    for (int m = 0; m < N_MAC; m++)
      for (int b = 0; b < N_BINS; b++) begin
        automatic int unsigned v;
        v = 0;
        for (int k = m; k < N_FILT; k += N_MAC) if (w[k][b] != 0) v = w[k][b];
        coef_we = 1; coef_bank = 3'(m); coef_addr = 8'(b); coef_data = 16'(v);
        @(negedge clk);
      end
    coef_we = 0;
    for (int i = 0; i < N_CEP; i++)
      for (int j = 0; j < N_FILT; j++) begin
        cos_we = 1; cos_sel = 4'(i); cos_addr = 6'(j); cos_data = 16'(cosine(i, j));
        @(negedge clk);
      end
    cos_we = 0;

    for (int f = 0; f < NFRM; f++) begin
      real lf [N_FILT];
      t_start = cyc;
      // frame blocking: samples f*HOP .. f*HOP+255
      for (int t = 0; t < N_BINS; t++) begin
        while (smp_full) @(negedge clk);
        smp_push = 1; smp_data = SAMPLE_W'(speech[f * HOP + t]);
        @(negedge clk);
      end
      smp_push = 0;
      // magnitudes
      for (int k = 0; k < N_BINS; k++) begin
        real re, im;
        while (bin_empty) @(negedge clk);
        re = real'(bin_data.re); im = real'(bin_data.im);
        mag[k] = int'($rtoi($sqrt(re * re + im * im) + 0.5));
        bin_pop = 1;
        @(negedge clk);
        bin_pop = 0;
      end
      for (int k = 0; k < N_BINS; k++) begin
        mag_we = 1; mag_addr = 8'(k); mag_data = 16'(mag[k]);
        @(negedge clk);
      end
      mag_we = 0;
      // filters -> log -> DCT, chained
      emag_start = 1; t_emag = cyc;
      @(negedge clk);
      emag_start = 0;
      while (cep_valid) @(negedge clk);
      while (!cep_valid) @(negedge clk);
      hw_cycles = cyc - t_emag;
      check(hw_cycles == int'(e[N_FILT-1]) + 49, $sformatf("frame %0d: %0d accelerator cycles", f, hw_cycles));
      if (hw_cycles > max_hw) max_hw = hw_cycles;
      if (cyc - t_start > max_frame) max_frame = cyc - t_start;
      // floating-point MFCC of the same magnitudes
      for (int k = 0; k < N_FILT; k++) begin
        automatic real s = 0.0;
        for (int b = 0; b < N_BINS; b++) s += wr[k][b] * mag[b];
        lf[k] = $ln(s);
      end
      for (int i = 0; i < N_CEP; i++) begin
        automatic real c = 0.0, hw = 0.0, off = 0.0;
        for (int j = 0; j < N_FILT; j++) c += lf[j] * $cos(3.14159265358979 * i * (j + 0.5) / N_FILT);
        c = c * 2.0 / N_FILT;
        // known offset on coefficient 0: 2 * (ln 10000 - 4)
        off = (i == 0) ? 2.0 * ($ln(10000.0) - 4.0) : 0.0;
        hw = real'(cep[i]) / 10000.0 - off;
        check(hw - c < 0.01 && c - hw < 0.01,
              $sformatf("frame %0d cep[%0d]: hardware %f, floating point %f", f, i, hw, c));
        if (hw - c > worst) worst = hw - c;
        if (c - hw > worst) worst = c - hw;
      end
    end
    check(u_fft.frames == NFRM, "every frame through the FFT core");
    $display("%0d frames, accelerator cycles per frame %0d, whole frame incl. FFT and transfers at most %0d cycles, worst MFCC error %f",
             NFRM, max_hw, max_frame, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
