// CNN convolution accelerator: top level.
//
// Computes one convolutional layer, out[m][r][c] = sum over n, i, j of
// w[m][n][i][j] * in[n][S*r+i][S*c+j], in single-precision floating point, with
// the loop nest tiled by (Tr, Tc, Tm, Tn). A compute engine of Tm x Tn multipliers
// and Tm adder trees consumes one (i, j, trr, tcc) point per cycle. It reads from
// ping-pong pairs of input, weight and output buffer sets, reached through
// crossbars, while an off-chip transfer manager fills and drains the other set of
// each pair through two FIFOs. A programmable controller sequences the tiles and
// the double buffering. The default parameters are those of the built accelerator:
// Tm x Tn = 64 x 7 = 448 PEs, Tr = Tc = 13, kernels up to 11 x 11, strides up to 4.
//
// Interface: the layer is given on `cfg` with a one-cycle `start` while not `busy`.
// Input and weight tiles arrive on in_valid/in_ready/in_data (one 32-bit word per
// transfer, in the order the transfer manager documents; edge tiles padded with
// zero words). Output tiles leave on out_valid/out_ready/out_data, Tm x Tr x Tc
// words per output tile, tiles in the order row, col, to; words of pixels outside
// the layer are to be discarded. `irq` pulses once when the layer is complete.
// Reset is synchronous, active low.
module accel_top
  import cnn_pkg::*;
#(
  parameter int unsigned TM     = 64,
  parameter int unsigned TN     = 7,
  parameter int unsigned TR     = 13,
  parameter int unsigned TC     = 13,
  parameter int unsigned K_MAX  = 11,
  parameter int unsigned S_MAX  = 4,
  parameter int unsigned FDEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  layer_cfg_t  cfg,
  input  logic        start,
  output logic        busy,
  output logic        irq,
  input  logic        in_valid,
  output logic        in_ready,
  input  fp32_t       in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output fp32_t       out_data,
  // performance events, one cycle each
  output logic        perf_overlap,    // computing while a tile is being loaded
  output logic        perf_in_stall,   // engine waiting for an input tile
  output logic        perf_out_stall   // engine waiting for an output set to drain
);

  localparam int unsigned IN_DEPTH = ((TR - 1) * S_MAX + K_MAX) * ((TC - 1) * S_MAX + K_MAX);
  localparam int unsigned W_DEPTH  = K_MAX * K_MAX;
  localparam int unsigned O_DEPTH  = TR * TC;
  localparam int unsigned IAW = (IN_DEPTH > 1) ? $clog2(IN_DEPTH) : 1;
  localparam int unsigned WAW = (W_DEPTH > 1) ? $clog2(W_DEPTH) : 1;
  localparam int unsigned OAW = (O_DEPTH > 1) ? $clog2(O_DEPTH) : 1;
  localparam int unsigned FCW = $clog2(FDEPTH + 1);
  localparam int unsigned NW  = TM * TN;

  // controller signals
  logic            ld_start, ld_set, ld_done, st_start, st_set, st_done;
  logic [31:0]     in_words;
  logic [7:0]      kk;
  logic            cp_act, cp_set, oc_act, oc_set, out_we, first;
  logic [IAW-1:0]  cp_in_raddr;
  logic [WAW-1:0]  cp_w_raddr;
  logic [OAW-1:0]  cp_out_raddr, cp_out_waddr;

  // transfer manager signals
  logic            ld_active, st_active;
  logic            lf_valid, lf_ready;
  fp32_t           lf_data;
  logic [TN-1:0]   ib_we;
  logic [IAW-1:0]  ib_waddr;
  fp32_t [TN-1:0]  ib_wdata;
  logic [NW-1:0]   wb_we;
  logic [WAW-1:0]  wb_waddr;
  fp32_t [NW-1:0]  wb_wdata;
  logic [OAW-1:0]  ob_raddr;
  fp32_t [TM-1:0]  ob_rdata;
  logic            sf_valid, sf_ready;
  fp32_t           sf_data;
  logic [FCW-1:0]  sf_count, lf_count;

  // datapath
  fp32_t [TN-1:0]          x;
  fp32_t [NW-1:0]          w_flat;
  fp32_t [TM-1:0][TN-1:0]  w;
  fp32_t [TM-1:0]          psum, acc;

  // buffer set ports
  logic  [1:0][TN-1:0]   is_we;
  logic  [1:0][IAW-1:0]  is_waddr, is_raddr;
  fp32_t [1:0][TN-1:0]   is_wdata, is_rdata;
  logic  [1:0][NW-1:0]   ws_we;
  logic  [1:0][WAW-1:0]  ws_waddr, ws_raddr;
  fp32_t [1:0][NW-1:0]   ws_wdata, ws_rdata;
  logic  [1:0][TM-1:0]   os_we;
  logic  [1:0][OAW-1:0]  os_waddr, os_raddr;
  fp32_t [1:0][TM-1:0]   os_wdata, os_rdata;

  controller #(
    .TM(TM), .TN(TN), .TR(TR), .TC(TC), .K_MAX(K_MAX), .S_MAX(S_MAX),
    .IAW(IAW), .WAW(WAW), .OAW(OAW)
  ) u_ctrl (
    .clk, .rst_n, .start, .cfg, .busy, .done(irq),
    .ld_start, .ld_set, .ld_done, .st_start, .st_set, .st_done,
    .in_words, .kk,
    .cp_act, .cp_set, .in_raddr(cp_in_raddr), .w_raddr(cp_w_raddr),
    .oc_act, .oc_set, .out_raddr(cp_out_raddr), .out_waddr(cp_out_waddr),
    .out_we, .first,
    .ev_overlap(perf_overlap), .ev_in_stall(perf_in_stall), .ev_out_stall(perf_out_stall)
  );

  stream_fifo #(.DEPTH(FDEPTH)) u_in_fifo (
    .clk, .rst_n,
    .s_valid(in_valid), .s_ready(in_ready), .s_data(in_data),
    .m_valid(lf_valid), .m_ready(lf_ready), .m_data(lf_data),
    .count(lf_count)
  );

  transfer_mgr #(
    .TM(TM), .TN(TN), .TR(TR), .TC(TC), .IAW(IAW), .WAW(WAW), .OAW(OAW), .FDEPTH(FDEPTH)
  ) u_xfer (
    .clk, .rst_n, .in_words, .kk,
    .ld_start, .ld_done, .ld_active,
    .in_valid(lf_valid), .in_ready(lf_ready), .in_data(lf_data),
    .ib_we, .ib_waddr, .ib_wdata, .wb_we, .wb_waddr, .wb_wdata,
    .st_start, .st_done, .st_active,
    .ob_raddr, .ob_rdata,
    .out_valid(sf_valid), .out_data(sf_data), .out_count(sf_count)
  );

  stream_fifo #(.DEPTH(FDEPTH)) u_out_fifo (
    .clk, .rst_n,
    .s_valid(sf_valid), .s_ready(sf_ready), .s_data(sf_data),
    .m_valid(out_valid), .m_ready(out_ready), .m_data(out_data),
    .count(sf_count)
  );

  // input buffers: compute reads, loader writes
  crossbar #(.NB(TN), .AW(IAW)) u_in_xbar (
    .clk, .rst_n,
    .act_a(cp_act), .sel_a(cp_set), .we_a('0), .waddr_a('0), .wdata_a('0),
    .raddr_a(cp_in_raddr), .rdata_a(x),
    .act_b(ld_active), .sel_b(ld_set), .we_b(ib_we), .waddr_b(ib_waddr), .wdata_b(ib_wdata),
    .raddr_b('0), .rdata_b(),
    .set_we(is_we), .set_waddr(is_waddr), .set_wdata(is_wdata), .set_raddr(is_raddr),
    .set_rdata(is_rdata)
  );

  // weight buffers: compute reads, loader writes
  crossbar #(.NB(NW), .AW(WAW)) u_w_xbar (
    .clk, .rst_n,
    .act_a(cp_act), .sel_a(cp_set), .we_a('0), .waddr_a('0), .wdata_a('0),
    .raddr_a(cp_w_raddr), .rdata_a(w_flat),
    .act_b(ld_active), .sel_b(ld_set), .we_b(wb_we), .waddr_b(wb_waddr), .wdata_b(wb_wdata),
    .raddr_b('0), .rdata_b(),
    .set_we(ws_we), .set_waddr(ws_waddr), .set_wdata(ws_wdata), .set_raddr(ws_raddr),
    .set_rdata(ws_rdata)
  );

  // output buffers: compute reads and writes back, storer reads
  crossbar #(.NB(TM), .AW(OAW)) u_out_xbar (
    .clk, .rst_n,
    .act_a(oc_act), .sel_a(oc_set), .we_a({TM{out_we}}), .waddr_a(cp_out_waddr), .wdata_a(acc),
    .raddr_a(cp_out_raddr), .rdata_a(psum),
    .act_b(st_active), .sel_b(st_set), .we_b('0), .waddr_b('0), .wdata_b('0),
    .raddr_b(ob_raddr), .rdata_b(ob_rdata),
    .set_we(os_we), .set_waddr(os_waddr), .set_wdata(os_wdata), .set_raddr(os_raddr),
    .set_rdata(os_rdata)
  );

  for (genvar s = 0; s < 2; s++) begin : g_set
    bank_set #(.NB(TN), .DEPTH(IN_DEPTH), .AW(IAW)) u_in_buf (
      .clk, .we(is_we[s]), .waddr(is_waddr[s]), .wdata(is_wdata[s]),
      .raddr(is_raddr[s]), .rdata(is_rdata[s])
    );
    bank_set #(.NB(NW), .DEPTH(W_DEPTH), .AW(WAW)) u_w_buf (
      .clk, .we(ws_we[s]), .waddr(ws_waddr[s]), .wdata(ws_wdata[s]),
      .raddr(ws_raddr[s]), .rdata(ws_rdata[s])
    );
    bank_set #(.NB(TM), .DEPTH(O_DEPTH), .AW(OAW)) u_out_buf (
      .clk, .we(os_we[s]), .waddr(os_waddr[s]), .wdata(os_wdata[s]),
      .raddr(os_raddr[s]), .rdata(os_rdata[s])
    );
  end

  assign w = w_flat;

  compute_engine #(.TM(TM), .TN(TN)) u_engine (
    .clk, .x, .w, .psum, .first, .acc_out(acc)
  );

  // the storer only offers a word when the output FIFO has room for it
  a_store_room: assert property (@(posedge clk) disable iff (!rst_n) sf_valid |-> sf_ready)
    else $error("accel_top: output FIFO overflow");

endmodule
