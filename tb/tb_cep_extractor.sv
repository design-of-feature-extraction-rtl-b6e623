// tb_cep_extractor: self-checking test of the 13-MAC cepstral extractor.
// Loads the 13 x 40 DCT matrix cos(pi*i*(j+0.5)/40) in Q14 into the cosine
// RAMs, then runs frames of random signed log ear-magnitudes, a frame of
// extreme values and a frame loaded while a run is in progress (which must
// be ignored). Each of the 13 outputs is compared against
// (sum_j x_j*m_ij * 3277) >>> 30 computed here, and against the real-valued
// 2/40 * sum x_j cos(...) to within rounding. Also checks the valid flag
// (cleared by start, set exactly 43 cycles after it) and that all 13 outputs
// change together.
module tb_cep_extractor;
  import mfcc_pkg::*;
  import mfcc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    in_we, cos_we, start, busy, cep_valid;
  logic [5:0]              in_addr, cos_addr;
  logic signed [LOG_W-1:0] in_data;
  logic [3:0]              cos_sel;
  logic signed [COS_W-1:0] cos_data;
  logic signed [CEP_W-1:0] cep [N_CEP];

  cep_extractor dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [N_FILT];

  task automatic run_frame(input int mode);
    int cyc;
    @(negedge clk);
    for (int j = 0; j < N_FILT; j++) begin
      case (mode)
        1:       x[j] = (j % 2) ? 32'sh7fff_ffff : 32'sh8000_0000;
        2:       x[j] = -200000 + int'($urandom % 200000);
        default: x[j] = int'($urandom % 400000) - 300000;
      endcase
      in_we = 1; in_addr = 6'(j); in_data = x[j];
      @(negedge clk);
    end
    in_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    check(!cep_valid, "valid cleared by start");
    cyc = 1;
    // try to overwrite the inputs during the run: must be ignored
    for (int j = 0; j < N_FILT; j++) begin
      in_we = 1; in_addr = 6'(j); in_data = 12345;
      @(negedge clk); cyc++;
      check(!cep_valid, "valid low during run");
    end
    in_we = 0;
    while (!cep_valid && cyc < 200) begin
      @(negedge clk); cyc++;
    end
    check(cyc == N_FILT + 3, $sformatf("result after %0d cycles, expected %0d", cyc, N_FILT + 3));
    for (int i = 0; i < N_CEP; i++) begin
      longint s = 0;
      real    r = 0.0;
      longint exp_v;
      for (int j = 0; j < N_FILT; j++) begin
        s += longint'(x[j]) * longint'(cosine(i, j));
        r += real'(x[j]) * $cos(3.14159265358979 * i * (j + 0.5) / N_FILT);
      end
      exp_v = (s * 3277) >>> 30;
      r = r * 2.0 / 40.0;
      check(cep[i] == CEP_W'(exp_v), $sformatf("cep[%0d] got %0d exp %0d", i, cep[i], exp_v));
      if (mode != 1)
        check(real'(cep[i]) - r < 40.0 && r - real'(cep[i]) < 40.0,
              $sformatf("cep[%0d] accuracy %0d vs %f", i, cep[i], r));
    end
    // the flag and the outputs hold until the next start
    repeat (5) @(negedge clk);
    check(cep_valid && !busy, "valid held");
  endtask

  initial begin
    in_we = 0; cos_we = 0; start = 0; in_addr = 0; cos_addr = 0;
    in_data = 0; cos_sel = 0; cos_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N_CEP; i++)
      for (int j = 0; j < N_FILT; j++) begin
        cos_we = 1; cos_sel = 4'(i); cos_addr = 6'(j); cos_data = 16'(cosine(i, j));
        @(negedge clk);
      end
    cos_we = 0;
    check(!cep_valid, "no valid after reset");
    run_frame(0);
    run_frame(2);
    run_frame(1);
    for (int n = 0; n < 5; n++) run_frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
