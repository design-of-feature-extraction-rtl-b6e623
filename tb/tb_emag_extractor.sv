// tb_emag_extractor: self-checking test of the 5-MAC ear-magnitude extractor.
// Loads a 40-filter Mel bank (weights x 10000) into the 5 coefficient banks
// (filter k in bank k mod 5) and the last-bin table, then runs frames of
// random 16-bit magnitudes (plus an all-maximum frame) and compares each of
// the 40 outputs, its index and its output cycle (last bin + 3 after start)
// against a direct 40 x 256 matrix-vector product. A second bank with
// filters of random widths spread over all 256 bins is run as well. Counts
// the MAC resets (each MAC must be reused 8 times per frame).
module tb_emag_extractor;
  import mfcc_pkg::*;
  import mfcc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_we, coef_we, end_we, start, busy, done;
  logic [7:0]           in_addr, coef_addr, end_data;
  logic [MAG_W-1:0]     in_data;
  logic [2:0]           coef_bank;
  logic [COEF_W-1:0]    coef_data;
  logic [5:0]           end_addr;
  logic                 emag_valid;
  logic [5:0]           emag_idx;
  logic [EMAG_W-1:0]    emag_data;

  emag_extractor dut (.*);

  int checks = 0, failures = 0;
  int resets [N_MAC];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  coef_mat_t w;
  end_tab_t  e;
  int unsigned a [N_BINS];

  task automatic load_bank();
    @(negedge clk);
    for (int k = 0; k < N_FILT; k++) begin
      end_we = 1; end_addr = 6'(k); end_data = 8'(e[k]);
      @(negedge clk);
    end
    end_we = 0;
    for (int m = 0; m < N_MAC; m++)
      for (int b = 0; b < N_BINS; b++) begin
        int unsigned v = 0;
        for (int k = m; k < N_FILT; k += N_MAC) if (w[k][b] != 0) v = w[k][b];
        coef_we = 1; coef_bank = 3'(m); coef_addr = 8'(b); coef_data = 16'(v);
        @(negedge clk);
      end
    coef_we = 0;
  endtask

  task automatic run_frame(input int mode);
    longint unsigned exp_v;
    int cyc, k;
    @(negedge clk);
    for (int b = 0; b < N_BINS; b++) begin
      a[b] = (mode == 1) ? 32'hffff : ($urandom & 32'hffff);
      in_we = 1; in_addr = 8'(b); in_data = 16'(a[b]);
      @(negedge clk);
    end
    in_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1; k = 0;
    while (k < N_FILT && cyc < N_BINS + 10) begin
      if (emag_valid) begin
        exp_v = 0;
        for (int b = 0; b < N_BINS; b++) exp_v += longint'(w[k][b]) * longint'(a[b]);
        check(emag_idx == 6'(k), $sformatf("filter index %0d exp %0d", emag_idx, k));
        check(emag_data == EMAG_W'(exp_v), $sformatf("filter %0d: got %0d exp %0d", k, emag_data, exp_v));
        check(cyc == int'(e[k]) + 3, $sformatf("filter %0d out at cycle %0d exp %0d", k, cyc, e[k] + 3));
        k++;
      end
      @(negedge clk);
      cyc++;
    end
    check(k == N_FILT, "all 40 ear-magnitudes produced");
    while (busy) @(negedge clk);
    check(!emag_valid, "no extra outputs");
  endtask

  // count MAC resets (a MAC handed over to its next filter)
  always @(posedge clk)
    if (dut.fin) resets[dut.ksel]++;

  initial begin
    in_we = 0; coef_we = 0; end_we = 0; start = 0;
    in_addr = 0; in_data = 0; coef_bank = 0; coef_addr = 0; coef_data = 0;
    end_addr = 0; end_data = 0;
    foreach (resets[m]) resets[m] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Mel bank
    mel_bank(w, e);
    load_bank();
    run_frame(0);
    run_frame(1);
    run_frame(0);
    for (int m = 0; m < N_MAC; m++)
      check(resets[m] == 3 * 8, $sformatf("MAC %0d reused %0d times", m, resets[m]));

    // random-width triangular-ish bank across all 256 bins
    begin
      int pos = 0;
      int st [N_FILT];
      for (int k = 0; k < N_FILT; k++) begin
        st[k] = pos;
        pos += 2 + $urandom % 5;
        e[k] = pos + 1 + $urandom % 3;
      end
      e[N_FILT-1] = 255;
      for (int k = 0; k < N_FILT; k++)
        for (int b = 0; b < N_BINS; b++)
          w[k][b] = (b >= st[k] && b <= e[k]) ? 1 + $urandom % 10000 : 0;
      // keep filters sharing one MAC apart
      for (int k = N_MAC; k < N_FILT; k++) check(st[k] > int'(e[k-N_MAC]), "test bank valid");
    end
    load_bank();
    run_frame(0);
    run_frame(1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
