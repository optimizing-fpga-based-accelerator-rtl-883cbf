// Synchronous FIFO with valid/ready handshakes on both sides.
//
// Sits between the accelerator and the external data-transfer (DMA) engines, as in
// the source design's system view. A word is written when s_valid && s_ready and
// read when m_valid && m_ready; both may happen in one cycle. `count` reports the
// fill level so that a producer with a read pipeline can reserve room ahead of
// time. Depth and handshake are this design's choices. Reset (active low,
// synchronous) empties it.
module stream_fifo
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_valid,
  output logic          s_ready,
  input  fp32_t         s_data,
  output logic          m_valid,
  input  logic          m_ready,
  output fp32_t         m_data,
  output logic [CW-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fp32_t          mem [DEPTH];
  logic [PW-1:0]  wptr, rptr;
  logic           push, pop;

  assign s_ready = (count < CW'(DEPTH));
  assign m_valid = (count != '0);
  assign m_data  = mem[rptr];
  assign push    = s_valid && s_ready;
  assign pop     = m_valid && m_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) begin
        mem[wptr] <= s_data;
        wptr <= (wptr == PW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      end
      if (pop) rptr <= (rptr == PW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + CW'(push) - CW'(pop);
    end
  end

  // handshake rule for the producer: an offered word stays until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           s_valid && !s_ready |=> s_valid && $stable(s_data))
    else $error("stream_fifo: offered word withdrawn or changed before accepted");

endmodule
