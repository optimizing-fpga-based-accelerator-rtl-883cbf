// One set of on-chip buffer banks (one half of a ping-pong pair).
//
// NB independent banks of DEPTH 32-bit words, like block RAMs. All banks share one
// write address and one read address; each bank has its own write enable and
// write data, so a transfer engine can fill a single bank while the compute engine
// can write a whole row of banks at once. Reads are synchronous: rdata holds the
// words at raddr one cycle after raddr is presented. A write and a read of the same
// address in one cycle return the old word.
//
// Used as an input buffer set (NB = Tn banks, one per input map), a weight buffer
// set (NB = Tm x Tn, one bank per multiplier) and an output buffer set (NB = Tm,
// one per output map). Banking by feature map follows the source design, which
// draws each buffer set as a row of banks; the port arrangement is this design's.
module bank_set
  import cnn_pkg::*;
#(
  parameter int unsigned NB    = 7,
  parameter int unsigned DEPTH = 3481,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic [NB-1:0]        we,
  input  logic [AW-1:0]        waddr,
  input  fp32_t [NB-1:0]       wdata,
  input  logic [AW-1:0]        raddr,
  output fp32_t [NB-1:0]       rdata
);

  for (genvar b = 0; b < NB; b++) begin : g_bank
    fp32_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we[b]) mem[waddr] <= wdata[b];
      rdata[b] <= mem[raddr];
    end
  end

endmodule
