// stream_fifo: synchronous first-in first-out buffer with valid/ready
// handshakes on both sides.
//
// A word moves in when s_valid and s_ready are both high on a rising clock
// edge, and out when m_valid and m_ready are both high. s_ready is low when
// the FIFO is full; m_valid is high whenever it holds a word, and m_data
// shows the oldest word (first-word-fall-through). A push and a pop may
// happen in the same cycle. `level` is the number of words held.
// Storage is a plain array with a read and a write pointer; DEPTH must be a
// power of two. Reset (rst_n low, synchronous) empties the FIFO.
module stream_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       s_valid,
  output logic                       s_ready,
  input  logic [W-1:0]               s_data,
  output logic                       m_valid,
  input  logic                       m_ready,
  output logic [W-1:0]               m_data,
  output logic [$clog2(DEPTH):0]     level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          push, pop;

  assign s_ready = (level != DEPTH[AW:0]);
  assign m_valid = (level != '0);
  assign m_data  = mem[rptr];
  assign push    = s_valid && s_ready;
  assign pop     = m_valid && m_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= s_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
      case ({push, pop})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  // The level never exceeds the depth
  a_level: assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));

endmodule
