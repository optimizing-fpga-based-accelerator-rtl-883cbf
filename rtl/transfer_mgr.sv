// Off-chip data transfer manager: moves tiles between the accelerator's FIFOs and
// its on-chip buffer sets.
//
// Loader: on ld_start it reads one input tile and then one weight tile from the
// input FIFO, one word per cycle when the FIFO has data, into the buffer sets the
// controller selected. Stream order (this design's choice): the Tn input maps one
// after the other, each as in_words words row by row; then the Tm x Tn kernels,
// output map outer, input map inner, each as K*K words row by row. Input word
// (tii, addr) goes to input bank tii, weight word (too, tii, i, j) to weight bank
// too*Tn + tii at address i*K + j. ld_done pulses with the last weight word.
//
// Storer: on st_start it reads the Tm x Tr x Tc finished output tile (output map
// outer, then rows, then columns) from the selected output set and pushes it into
// the output FIFO. The bank read takes a cycle, so a read is issued only while the
// FIFO has room for it and for the read already in flight; that keeps one word per
// cycle without overflowing. st_done pulses with the last word pushed.
//
// Loader and storer run independently, so a tile can be loaded while another is
// stored and a third computed.
module transfer_mgr
  import cnn_pkg::*;
#(
  parameter int unsigned TM    = 64,
  parameter int unsigned TN    = 7,
  parameter int unsigned TR    = 13,
  parameter int unsigned TC    = 13,
  parameter int unsigned IAW   = 12,
  parameter int unsigned WAW   = 7,
  parameter int unsigned OAW   = 8,
  parameter int unsigned FDEPTH = 16,
  parameter int unsigned FCW   = $clog2(FDEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          in_words,
  input  logic [7:0]           kk,
  // loader
  input  logic                 ld_start,
  output logic                 ld_done,
  output logic                 ld_active,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  fp32_t                in_data,
  output logic [TN-1:0]        ib_we,
  output logic [IAW-1:0]       ib_waddr,
  output fp32_t [TN-1:0]       ib_wdata,
  output logic [TM*TN-1:0]     wb_we,
  output logic [WAW-1:0]       wb_waddr,
  output fp32_t [TM*TN-1:0]    wb_wdata,
  // storer
  input  logic                 st_start,
  output logic                 st_done,
  output logic                 st_active,
  output logic [OAW-1:0]       ob_raddr,
  input  fp32_t [TM-1:0]       ob_rdata,
  output logic                 out_valid,
  output fp32_t                out_data,
  input  logic [FCW-1:0]       out_count
);

  typedef enum logic [1:0] {L_IDLE, L_IN, L_W} lstate_t;

  localparam int unsigned OWORDS = TR * TC;

  lstate_t     lstate;
  logic [31:0] laddr;
  logic [15:0] lbank;
  logic        take;

  assign ld_active = (lstate != L_IDLE);
  assign in_ready  = ld_active;
  assign take      = in_valid && in_ready;

  always_comb begin
    ib_we    = '0;
    wb_we    = '0;
    ib_waddr = IAW'(laddr);
    wb_waddr = WAW'(laddr);
    ib_wdata = {TN{in_data}};
    wb_wdata = {(TM*TN){in_data}};
    if (take && lstate == L_IN) ib_we[lbank] = 1'b1;
    if (take && lstate == L_W)  wb_we[lbank] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lstate  <= L_IDLE;
      laddr   <= '0;
      lbank   <= '0;
      ld_done <= 1'b0;
    end else begin
      ld_done <= 1'b0;
      case (lstate)
        L_IDLE: if (ld_start) begin
          lstate <= L_IN;
          laddr  <= '0;
          lbank  <= '0;
        end
        L_IN: if (take) begin
          if (laddr == in_words - 1) begin
            laddr <= '0;
            if (lbank == 16'(TN - 1)) begin
              lbank  <= '0;
              lstate <= L_W;
            end else lbank <= lbank + 1'b1;
          end else laddr <= laddr + 1;
        end
        L_W: if (take) begin
          if (laddr == 32'(kk) - 1) begin
            laddr <= '0;
            if (lbank == 16'(TM * TN - 1)) begin
              lbank   <= '0;
              lstate  <= L_IDLE;
              ld_done <= 1'b1;
            end else lbank <= lbank + 1'b1;
          end else laddr <= laddr + 1;
        end
        default: lstate <= L_IDLE;
      endcase
    end
  end

  // storer
  logic [OAW-1:0] saddr;
  logic [15:0]    sbank;
  logic           srun, sall, issue;
  logic           rd_pend, rd_last;
  logic [15:0]    rd_bank;

  assign st_active = srun;
  assign ob_raddr  = saddr;
  assign issue     = srun && !sall && (32'(out_count) + 32'(rd_pend) < FDEPTH);
  assign out_valid = rd_pend;
  assign out_data  = ob_rdata[rd_bank];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      srun    <= 1'b0;
      sall    <= 1'b0;
      saddr   <= '0;
      sbank   <= '0;
      rd_pend <= 1'b0;
      rd_last <= 1'b0;
      rd_bank <= '0;
      st_done <= 1'b0;
    end else begin
      st_done <= 1'b0;
      rd_pend <= issue;
      if (issue) begin
        rd_bank <= sbank;
        rd_last <= (sbank == 16'(TM - 1)) && (saddr == OAW'(OWORDS - 1));
        if (saddr == OAW'(OWORDS - 1)) begin
          saddr <= '0;
          if (sbank == 16'(TM - 1)) begin
            sbank <= '0;
            sall  <= 1'b1;
          end else sbank <= sbank + 1'b1;
        end else saddr <= saddr + 1'b1;
      end
      if (rd_pend && rd_last) begin
        srun    <= 1'b0;
        st_done <= 1'b1;
      end
      if (st_start && !srun) begin
        srun  <= 1'b1;
        sall  <= 1'b0;
        saddr <= '0;
        sbank <= '0;
      end
    end
  end

endmodule
