// tb_mfcc_top: end-to-end test of the MFCC hardware at its full size
// (256-point frames, 40 filters on 5 MACs, 13 coefficients), with a
// behavioural FFT core between the two FIFOs and this testbench playing the
// processor.
//
// Per run: two speech-like frames (sums of tones plus noise, 16 bit) are
// pushed back to back into the Write-FIFO, so the second frame waits on a
// busy FFT core (Write-FIFO stall) and its results wait on a full
// Read-FIFO. Each frame's 256 bins are popped and compared with the core's
// output, turned into magnitudes (rounded sqrt(re^2+im^2), the processor's
// job), and written to the ear-magnitude extractor. The first frame runs
// with chain_en = 1 (log ear-magnitudes go straight into the cepstral
// extractor, which starts by itself); the second with chain_en = 0 (the
// processor stores them and loads and starts the cepstral extractor). A
// third, silent frame drives zero into the logarithm. Every ear-magnitude,
// log value and cepstral coefficient is compared with a model computed
// here, and the emag_start -> cep_valid latency of the chained path is
// checked. Each mechanism must occur at least once.
module tb_mfcc_top;
  import mfcc_pkg::*;
  import mfcc_tb_pkg::*;

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
  // mechanism counters
  int n_wfifo_full = 0, n_fft_stall = 0, n_rfifo_full = 0, n_mac_reset = 0;
  int n_chain = 0, n_proc = 0, n_log_zero = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (smp_full) n_wfifo_full++;
    if (fft_in_valid && !fft_in_ready) n_fft_stall++;
    if (fft_out_valid && !fft_out_ready) n_rfifo_full++;
    if (dut.u_emag.fin && dut.u_emag.kf >= 6'(N_MAC)) n_mac_reset++;
    if (dut.u_log.in_valid && dut.u_log.in_data == '0) n_log_zero++;
  end

  coef_mat_t w;
  end_tab_t  e;
  int unsigned mag [N_BINS];
  int          lem_got [N_FILT];
  int          cyc = 0;
  always @(posedge clk) cyc++;

  // lem monitor
  always @(negedge clk) if (rst_n && lem_valid) lem_got[lem_idx] = lem_data;

  // processor: push one frame of samples, waiting while the Write-FIFO is full
  task automatic push_frame(input int kind, input int seed);
    for (int t = 0; t < N_BINS; t++) begin
      real v;
      if (kind == 0)
        v = 6000.0 * $sin(2.0 * 3.14159265358979 * (300.0 + 40.0 * seed) * t / 8000.0)
          + 4000.0 * $sin(2.0 * 3.14159265358979 * (1200.0 + 90.0 * seed) * t / 8000.0)
          + 2500.0 * $sin(2.0 * 3.14159265358979 * 2900.0 * t / 8000.0)
          + real'(int'($urandom % 2001) - 1000);
      else v = 0.0;
      @(negedge clk);
      while (smp_full) @(negedge clk);
      smp_push = 1; smp_data = SAMPLE_W'(int'(v));
      @(negedge clk);
      smp_push = 0;
    end
  endtask

  // processor: pop one frame of bins and write magnitudes
  task automatic pop_frame();
    for (int k = 0; k < N_BINS; k++) begin
      real re, im;
      @(negedge clk);
      while (bin_empty) @(negedge clk);
      check(u_fft.sent_q.size() > 0 && bin_data == u_fft.sent_q[0], $sformatf("bin %0d through Read-FIFO", k));
      if (u_fft.sent_q.size() > 0) void'(u_fft.sent_q.pop_front());
      re = real'(bin_data.re); im = real'(bin_data.im);
      mag[k] = int'($rtoi($sqrt(re * re + im * im) + 0.5));
      if (mag[k] > 65535) mag[k] = 65535;
      bin_pop = 1;
      @(negedge clk);
      bin_pop = 0;
    end
    for (int k = 0; k < N_BINS; k++) begin
      mag_we = 1; mag_addr = 8'(k); mag_data = 16'(mag[k]);
      @(negedge clk);
    end
    mag_we = 0;
  endtask

  // run filters, log and DCT on the loaded magnitudes; check everything
  task automatic run_features(input bit chained);
    longint unsigned em;
    longint          lexp [N_FILT];
    int              t0, lat;
    chain_en = chained;
    @(negedge clk);
    foreach (lem_got[k]) lem_got[k] = 32'h7fff_ffff;
    emag_start = 1; t0 = cyc;
    @(negedge clk);
    emag_start = 0;
    if (chained) begin
      // the flag of the previous run stays up until the chained start
      while (cep_valid && cyc - t0 < 1000) @(negedge clk);
      while (!cep_valid && cyc - t0 < 1000) @(negedge clk);
      lat = cyc - t0;
      check(lat == int'(e[N_FILT-1]) + 49, $sformatf("chained latency %0d, expected %0d", lat, e[N_FILT-1] + 49));
      n_chain++;
    end else begin
      while (emag_busy) @(negedge clk);
      repeat (4) @(negedge clk);
      check(!dct_busy, "cepstral extractor idle in processor mode");
    end
    for (int k = 0; k < N_FILT; k++) begin
      em = 0;
      for (int b = 0; b < N_BINS; b++) em += longint'(w[k][b]) * longint'(mag[b]);
      lexp[k] = ref_log(em);
      check(lem_got[k] == int'(lexp[k]), $sformatf("chain %0d log emag %0d got %0d exp %0d em %0d", chained, k, lem_got[k], lexp[k], em));
      if (em > 0)
        check(real'(lem_got[k]) - (10000.0 * $ln(real'(em)) - 40000.0) < 5.0 &&
              (10000.0 * $ln(real'(em)) - 40000.0) - real'(lem_got[k]) < 45.0, "log accuracy");
    end
    if (!chained) begin
      // processor stores the log ear-magnitudes and hands them to the DCT
      for (int k = 0; k < N_FILT; k++) begin
        dct_we = 1; dct_addr = 6'(k); dct_data = lem_got[k];
        @(negedge clk);
      end
      dct_we = 0;
      dct_start = 1;
      @(negedge clk);
      dct_start = 0;
      @(negedge clk);
      check(!cep_valid, "valid flag cleared at start");
      while (!cep_valid && cyc - t0 < 2000) @(negedge clk);
      n_proc++;
    end
    for (int i = 0; i < N_CEP; i++) begin
      longint s = 0;
      for (int j = 0; j < N_FILT; j++) s += lexp[j] * longint'(cosine(i, j));
      check(cep[i] == CEP_W'((s * 3277) >>> 30), $sformatf("cep[%0d] got %0d exp %0d", i, cep[i], (s * 3277) >>> 30));
    end
  endtask

  initial begin
    smp_push = 0; smp_data = 0; bin_pop = 0;
    mag_we = 0; mag_addr = 0; mag_data = 0;
    coef_we = 0; coef_bank = 0; coef_addr = 0; coef_data = 0;
    end_we = 0; end_addr = 0; end_data = 0; emag_start = 0;
    chain_en = 0; dct_we = 0; dct_addr = 0; dct_data = 0;
    cos_we = 0; cos_sel = 0; cos_addr = 0; cos_data = 0; dct_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // filter bank and cosine tables, computed beforehand and loaded
    mel_bank(w, e);
    @(negedge clk);
    for (int k = 0; k < N_FILT; k++) begin
      end_we = 1; end_addr = 6'(k); end_data = 8'(e[k]);
      @(negedge clk);
    end
    end_we = 0;
    for (int m = 0; m < N_MAC; m++)
      for (int b = 0; b < N_BINS; b++) begin
        int unsigned v;
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

    // two frames back to back, popped only after the second stalls
    fork
      begin
        push_frame(0, 1);
        push_frame(0, 2);
      end
      begin
        wait (n_rfifo_full > 20);
      end
    join
    pop_frame();
    run_features(1'b1);
    pop_frame();
    run_features(1'b0);

    // a silent frame: every ear-magnitude is zero
    push_frame(1, 0);
    pop_frame();
    run_features(1'b1);

    check(u_fft.frames == 3, "three frames through the FFT core");
    $display("mechanisms: write-fifo full %0d, fft input stall %0d, read-fifo full %0d, MAC resets %0d, chained runs %0d, processor runs %0d, log of zero %0d",
             n_wfifo_full, n_fft_stall, n_rfifo_full, n_mac_reset, n_chain, n_proc, n_log_zero);
    check(n_wfifo_full > 0, "Write-FIFO full happened");
    check(n_fft_stall > 0, "FFT input stall happened");
    check(n_rfifo_full > 0, "Read-FIFO full happened");
    check(n_mac_reset == 3 * (N_FILT - N_MAC), "every MAC reused for 7 more filters per frame");
    check(n_chain > 0, "chained mode happened");
    check(n_proc > 0, "processor mode happened");
    check(n_log_zero > 0, "log of zero happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
