// fft256_model: behavioural model (testbench only, not synthesizable) of the
// streaming 256-point forward FFT core that sits between the Write-FIFO and
// the Read-FIFO. It accepts 256 real samples over a valid/ready handshake,
// waits LATENCY clock cycles (862 by default, the figure quoted for the core)
// and then streams the 256 complex results in natural order, each divided
// by 256 and rounded, holding a result while m_ready is low. It takes no new
// frame until the previous one has been sent. Every result handed over is
// also queued in sent_q so a testbench can compare what passes through the
// Read-FIFO.
module fft256_model
  import mfcc_pkg::*;
#(
  parameter int LATENCY = 862
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       s_valid,
  output logic                       s_ready,
  input  logic signed [SAMPLE_W-1:0] s_data,
  output logic                       m_valid,
  input  logic                       m_ready,
  output cplx_t                      m_data
);
  typedef enum logic [1:0] {COLLECT, WAIT, SEND} state_t;
  state_t state;
  int     n, wait_cnt;
  int     x [N_BINS];
  cplx_t  last_out [N_BINS];
  int     frames = 0;
  cplx_t  sent_q [$];   // every result handed over, oldest first

  function automatic int rnd(real v);
    return (v < 0.0) ? -int'($rtoi(-v + 0.5)) : int'($rtoi(v + 0.5));
  endfunction

  function automatic void dft();
    for (int k = 0; k < N_BINS; k++) begin
      real re = 0.0, im = 0.0;
      for (int t = 0; t < N_BINS; t++) begin
        real ph = 2.0 * 3.14159265358979 * ((k * t) % N_BINS) / N_BINS;
        re += x[t] * $cos(ph);
        im -= x[t] * $sin(ph);
      end
      last_out[k].re = SAMPLE_W'(rnd(re / N_BINS));
      last_out[k].im = SAMPLE_W'(rnd(im / N_BINS));
    end
  endfunction

  assign s_ready = rst_n && (state == COLLECT);
  assign m_valid = (state == SEND);
  assign m_data  = last_out[n % N_BINS];

  always @(posedge clk) begin
    if (!rst_n) begin
      state <= COLLECT;
      n <= 0;
      wait_cnt <= 0;
    end else begin
      case (state)
        COLLECT: if (s_valid) begin
          x[n] = int'(s_data);
          if (n == N_BINS - 1) begin
            dft();
            state <= WAIT;
            wait_cnt <= 1;
            n <= 0;
          end else n <= n + 1;
        end
        WAIT: begin
          if (wait_cnt == LATENCY) state <= SEND;
          wait_cnt <= wait_cnt + 1;
        end
        SEND: if (m_ready) begin
          sent_q.push_back(m_data);
          if (n == N_BINS - 1) begin
            state <= COLLECT;
            n <= 0;
            frames <= frames + 1;
          end else n <= n + 1;
        end
        default: state <= COLLECT;
      endcase
    end
  end
endmodule
