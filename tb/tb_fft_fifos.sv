// tb_fft_fifos: self-checking test of the Write-FIFO / Read-FIFO pair.
// Phase 1 fills the Write-FIFO to its 256-word depth with the FFT side
// stalled, checks smp_full, then drains it through the FFT-side handshake
// with random ready and checks order. Phase 2 streams words through both
// FIFOs at once with random valid/ready on every side and compares each word
// against a queue model. Also checks that a pushed word is offered to the
// core one cycle later.
module tb_fft_fifos;
  import mfcc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       smp_push;
  logic signed [SAMPLE_W-1:0] smp_data;
  logic                       smp_full;
  logic [8:0]                 wr_level, rd_level;
  logic                       fft_in_valid, fft_in_ready;
  logic signed [SAMPLE_W-1:0] fft_in_data;
  logic                       fft_out_valid, fft_out_ready;
  cplx_t                      fft_out_data;
  logic                       bin_pop, bin_empty;
  cplx_t                      bin_data;

  fft_fifos dut (.*);

  int checks = 0, failures = 0;
  int full_seen = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [SAMPLE_W-1:0] wq [$];
  cplx_t                      rq [$];
  int n_in_push, n_in_pop, n_out_push, n_out_pop;

  initial begin
    smp_push = 0; smp_data = '0; fft_in_ready = 0;
    fft_out_valid = 0; fft_out_data = '0; bin_pop = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(!fft_in_valid && bin_empty && !smp_full, "empty after reset");

    // ---------- phase 1: fill the Write-FIFO ----------
    for (int i = 0; i < N_BINS; i++) begin
      @(negedge clk);
      check(!smp_full, "not full before 256 words");
      smp_push = 1; smp_data = SAMPLE_W'($urandom);
      wq.push_back(smp_data);
      @(posedge clk);
      #1;
      if (i == 0) check(fft_in_valid && fft_in_data == wq[0], "first word offered next cycle");
    end
    @(negedge clk);
    smp_push = 0;
    check(smp_full && wr_level == 9'd256, "full at 256 words");
    if (smp_full) full_seen++;
    // drain with random ready
    while (wq.size() > 0) begin
      @(negedge clk);
      fft_in_ready = ($urandom % 3) != 0;
      if (fft_in_ready) begin
        check(fft_in_valid, "valid while words remain");
        check(fft_in_data == wq[0], $sformatf("write-fifo order, got %0d exp %0d", fft_in_data, wq[0]));
        void'(wq.pop_front());
      end
      @(posedge clk);
    end
    @(negedge clk);
    fft_in_ready = 0;
    check(!fft_in_valid, "write-fifo empty after drain");

    // ---------- phase 2: concurrent random traffic on both FIFOs ----------
    n_in_push = 0; n_in_pop = 0; n_out_push = 0; n_out_pop = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // processor pushes samples
      smp_push = !smp_full && ($urandom % 2 == 0) && n_in_push < 2000;
      smp_data = SAMPLE_W'($urandom);
      // FFT consumes samples
      fft_in_ready = ($urandom % 4) != 0;
      if (fft_in_ready && fft_in_valid) begin
        check(fft_in_data == wq[0], "write-fifo streaming order");
        void'(wq.pop_front());
        n_in_pop++;
      end
      if (smp_push) begin wq.push_back(smp_data); n_in_push++; end
      // FFT produces bins, bursty
      fft_out_valid = (cyc % 700) < 400 && n_out_push < 2000;
      fft_out_data  = cplx_t'($urandom);
      if (fft_out_valid && fft_out_ready) begin rq.push_back(fft_out_data); n_out_push++; end
      if (!fft_out_ready) full_seen++;
      // processor pops bins, slowly at first so the Read-FIFO fills
      bin_pop = !bin_empty && ((cyc < 1000) ? ($urandom % 4 == 0) : ($urandom % 2 == 0));
      if (bin_pop) begin
        check(bin_data == rq[0], "read-fifo order");
        void'(rq.pop_front());
        n_out_pop++;
      end
      @(posedge clk);
    end
    @(negedge clk);
    smp_push = 0; bin_pop = 0; fft_out_valid = 0; fft_in_ready = 0;
    check(n_in_pop > 1000 && n_out_pop > 1000, "enough traffic");
    check(wr_level == 9'(wq.size()) && rd_level == 9'(rq.size()), "levels match model");
    check(full_seen > 1, "both FIFOs reached full");
    $display("write words %0d, read words %0d, full events %0d", n_in_pop, n_out_pop, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
