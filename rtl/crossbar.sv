// Crossbar between a ping-pong pair of buffer sets and their two users.
//
// Side A is the compute engine, side B the off-chip transfer manager. Each side
// drives a read address, a write address, per-bank write enables and write data,
// and selects which of the two sets it works on (sel_a, sel_b). A set takes the
// port of the side that selects it and is active (A first); a set nobody selects
// sees no write. Each side reads the set it selects. Because the controller keeps
// the two sides on different sets, loading or draining one set overlaps with
// computing on the other: the double buffering of the source design. That the two
// active sides never select the same set is checked by an assertion, out of
// reset. The crossbar itself is combinational; clk and rst_n serve the assertion.
module crossbar
  import cnn_pkg::*;
#(
  parameter int unsigned NB = 7,
  parameter int unsigned AW = 12
) (
  input  logic               clk,
  input  logic               rst_n,  // only disables the assertion during reset
  // side A (compute engine)
  input  logic               act_a,
  input  logic               sel_a,
  input  logic [NB-1:0]      we_a,
  input  logic [AW-1:0]      waddr_a,
  input  fp32_t [NB-1:0]     wdata_a,
  input  logic [AW-1:0]      raddr_a,
  output fp32_t [NB-1:0]     rdata_a,
  // side B (transfer manager)
  input  logic               act_b,
  input  logic               sel_b,
  input  logic [NB-1:0]      we_b,
  input  logic [AW-1:0]      waddr_b,
  input  fp32_t [NB-1:0]     wdata_b,
  input  logic [AW-1:0]      raddr_b,
  output fp32_t [NB-1:0]     rdata_b,
  // the two buffer sets
  output logic [1:0][NB-1:0]   set_we,
  output logic [1:0][AW-1:0]   set_waddr,
  output fp32_t [1:0][NB-1:0]  set_wdata,
  output logic [1:0][AW-1:0]   set_raddr,
  input  fp32_t [1:0][NB-1:0]  set_rdata
);

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      if (act_a && sel_a == k[0]) begin
        set_we[k]    = we_a;
        set_waddr[k] = waddr_a;
        set_wdata[k] = wdata_a;
        set_raddr[k] = raddr_a;
      end else if (act_b && sel_b == k[0]) begin
        set_we[k]    = we_b;
        set_waddr[k] = waddr_b;
        set_wdata[k] = wdata_b;
        set_raddr[k] = raddr_b;
      end else begin
        set_we[k]    = '0;
        set_waddr[k] = '0;
        set_wdata[k] = '0;
        set_raddr[k] = '0;
      end
    end
  end

  assign rdata_a = set_rdata[sel_a];
  assign rdata_b = set_rdata[sel_b];

  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(act_a && act_b && sel_a == sel_b))
    else $error("crossbar: both sides on buffer set %0d", sel_a);

endmodule
