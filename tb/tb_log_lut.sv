// tb_log_lut: self-checking test of the LUT-based natural logarithm.
// Feeds one input per cycle (powers of two, their neighbours, zero, the
// largest 40-bit value and random values of random bit length) and compares
// every output, two cycles later and in order, against an integer model
// whose table is computed here with $ln. It also checks the result against
// the true 10000*ln(a) - 40000: truncating the 8-bit index may only make
// it smaller, by at most 10000*ln(1+1/256) = 39 plus rounding.
module tb_log_lut;
  import mfcc_pkg::*;
  import mfcc_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    in_valid, out_valid;
  logic [5:0]              in_tag, out_tag;
  logic [EMAG_W-1:0]       in_data;
  logic signed [LOG_W-1:0] out_data;

  log_lut dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned stim [$];
  longint unsigned sent [$];
  int              sent_cyc [$];
  int              cyc = 0;

  always @(posedge clk) cyc++;

  // output monitor: in order, exactly 2 cycles after the input
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint unsigned a;
      longint exp_v;
      real    truth;
      a = sent.pop_front();
      exp_v = ref_log(a);
      check(out_data == LOG_W'(exp_v), $sformatf("log(%0d): got %0d exp %0d", a, out_data, exp_v));
      check(cyc - sent_cyc.pop_front() == 2, "latency 2 cycles");
      check(out_tag == 6'(a % 64), "tag follows data");
      if (a > 0) begin
        truth = 10000.0 * $ln(real'(a)) - 40000.0;
        // index truncation costs at most ln(1 + 1/256) = 0.0039 in ln(a)
        check(real'(out_data) - truth < 5.0 && truth - real'(out_data) < 45.0,
              $sformatf("log(%0d) accuracy: got %0d true %f", a, out_data, truth));
      end
    end
  end

  initial begin
    in_valid = 0; in_tag = 0; in_data = 0;
    stim.push_back(0);
    stim.push_back(1);
    stim.push_back(64'hff_ffff_ffff);
    for (int i = 0; i < EMAG_W; i++) begin
      stim.push_back(64'd1 << i);
      stim.push_back((64'd1 << i) + 1);
      if (i > 0) stim.push_back((64'd1 << i) - 1);
    end
    for (int n = 0; n < 2000; n++) begin
      int bits = 1 + $urandom % EMAG_W;
      longint unsigned v = {$urandom, $urandom};
      stim.push_back(v & ((64'd1 << bits) - 1));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (stim[i]) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      if (in_valid) begin
        in_data = EMAG_W'(stim[i]);
        in_tag  = 6'(stim[i] % 64);
        sent.push_back(stim[i]);
        sent_cyc.push_back(cyc);
      end else begin
        in_data = EMAG_W'($urandom);
        // re-send this one on a later cycle
        stim.push_back(stim[i]);
      end
      if (i > 6000) break;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    check(sent.size() == 0, "every input produced an output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
