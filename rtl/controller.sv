// Programmable controller: runs the tiled loop nest of one convolutional layer.
//
// The layer (R, C, M, N, K, S) is written at `start`. The controller walks the
// tile loops row, col, to, ti (steps Tr, Tc, Tm, Tn) and, for each tile, the
// point loops in the order i, j, trr, tcc, issuing one (i, j, trr, tcc) point per
// cycle to the compute engine, whose Tm x Tn PEs unroll the `to` and `ti` loops.
// One tile therefore takes K*K*Tr*Tc cycles plus a fixed P = 4 cycles (3 of
// pipeline drain and 1 to start the next tile): the source design's execution
// model. Tiles are always computed at full Tr x Tc x Tm x Tn; the data stream pads
// the edges with zeros, so those extra results are computed and discarded.
//
// Double buffering: input/weight sets and output sets come in pairs. Flags
// in_full[2] / out_full[2] record which sets hold a loaded input tile or a finished
// output tile. The controller starts the transfer manager's loader on a free input
// set and its storer on a full output set, while the engine computes on the other
// sets, so that data transfer overlaps computation. The output tile stays on chip
// across all ti tiles and is written out once (local memory promotion); the first
// contribution to each output pixel (ti = 0, i = 0, j = 0) overwrites instead of
// accumulating, so output sets need no clearing.
//
// Engine pipeline, from a point issued in cycle t: buffer addresses in t, buffer
// words (x, w) in t+1, partial-sum read address in t+2, partial sum and write-back
// in t+3. The next read of an output word comes Tr*Tc cycles after its previous
// issue, so Tr*Tc >= 2 keeps read and write-back apart.
//
// Events: ev_overlap marks a cycle in which the engine computes while a tile is
// loaded; ev_in_stall a cycle the engine waits for input; ev_out_stall a cycle it
// waits for an output set to drain. `done` is a one-cycle pulse (the interrupt to
// the host) when the last output tile has left the accelerator.
module controller
  import cnn_pkg::*;
#(
  parameter int unsigned TM    = 64,
  parameter int unsigned TN    = 7,
  parameter int unsigned TR    = 13,
  parameter int unsigned TC    = 13,
  parameter int unsigned K_MAX = 11,
  parameter int unsigned S_MAX = 4,
  parameter int unsigned IAW   = 12,
  parameter int unsigned WAW   = 7,
  parameter int unsigned OAW   = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  layer_cfg_t      cfg,
  output logic            busy,
  output logic            done,
  // transfer manager
  output logic            ld_start,
  output logic            ld_set,
  input  logic            ld_done,
  output logic            st_start,
  output logic            st_set,
  input  logic            st_done,
  output logic [31:0]     in_words,   // words per input bank of one tile
  output logic [7:0]      kk,         // words per weight bank (K*K)
  // input and weight buffers, compute side
  output logic            cp_act,
  output logic            cp_set,
  output logic [IAW-1:0]  in_raddr,
  output logic [WAW-1:0]  w_raddr,
  // output buffers, compute side
  output logic            oc_act,
  output logic            oc_set,
  output logic [OAW-1:0]  out_raddr,
  output logic [OAW-1:0]  out_waddr,
  output logic            out_we,
  output logic            first,      // with the partial sum (stage 3)
  // events
  output logic            ev_overlap,
  output logic            ev_in_stall,
  output logic            ev_out_stall
);

  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_RUN, C_DRAIN} cstate_t;

  cstate_t     state;
  layer_cfg_t  cfg_q;
  logic [31:0] n_tiles_n;     // ceil(N/Tn)
  logic [31:0] n_out_tiles;   // ceil(R/Tr)*ceil(C/Tc)*ceil(M/Tm)
  logic [31:0] n_loads;       // n_out_tiles * n_tiles_n
  logic [31:0] loads_issued, out_tiles_done, stores_done, ti_idx;
  logic [1:0]  in_full, out_full;
  logic        ld_busy, st_busy;
  logic [3:0]  ci, cj;
  logic [15:0] trr, tcc;
  logic [1:0]  dcnt;
  logic [31:0] iw;            // input tile width (Tc-1)*S + K
  logic        last_point, go;

  // pipeline of issued points
  logic        v1, v2, v3;
  logic        f1, f2, f3;
  logic [OAW-1:0] oa1, oa2, oa3;

  assign iw       = 32'((TC - 1) * cfg_q.s + cfg_q.k);
  assign in_words = 32'(((TR - 1) * cfg_q.s + cfg_q.k)) * iw;
  assign kk       = 8'(cfg_q.k * cfg_q.k);

  assign in_raddr = IAW'((32'(trr) * cfg_q.s + 32'(ci)) * iw + 32'(tcc) * cfg_q.s + 32'(cj));
  assign w_raddr  = WAW'(32'(ci) * cfg_q.k + 32'(cj));

  assign last_point = (ci == cfg_q.k - 1) && (cj == cfg_q.k - 1) &&
                      (trr == 16'(TR - 1)) && (tcc == 16'(TC - 1));
  assign go = (state == C_WAIT) && (out_tiles_done != n_out_tiles) && in_full[cp_set] &&
              (ti_idx != 0 || !out_full[oc_set]);

  assign cp_act    = (state == C_RUN) || (state == C_DRAIN);
  assign oc_act    = cp_act;
  assign out_raddr = oa2;
  assign out_waddr = oa3;
  assign out_we    = v3;
  assign first     = f3;

  assign ld_start = busy && !ld_busy && (loads_issued != n_loads) && !in_full[ld_set];
  assign st_start = busy && !st_busy && out_full[st_set];

  assign ev_overlap   = (state == C_RUN) && ld_busy;
  assign ev_in_stall  = (state == C_WAIT) && (out_tiles_done != n_out_tiles) && !in_full[cp_set];
  assign ev_out_stall = (state == C_WAIT) && (out_tiles_done != n_out_tiles) && in_full[cp_set] &&
                        ti_idx == 0 && out_full[oc_set];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= C_IDLE;
      busy <= 1'b0;
      done <= 1'b0;
      cfg_q <= '0;
      n_tiles_n <= '0;
      n_out_tiles <= '0;
      n_loads <= '0;
      loads_issued <= '0;
      out_tiles_done <= '0;
      stores_done <= '0;
      ti_idx <= '0;
      in_full <= '0;
      out_full <= '0;
      ld_busy <= 1'b0;
      st_busy <= 1'b0;
      ld_set <= 1'b0;
      st_set <= 1'b0;
      cp_set <= 1'b0;
      oc_set <= 1'b0;
      ci <= '0; cj <= '0; trr <= '0; tcc <= '0; dcnt <= '0;
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      f1 <= 1'b0; f2 <= 1'b0; f3 <= 1'b0;
      oa1 <= '0; oa2 <= '0; oa3 <= '0;
    end else begin
      done <= 1'b0;

      // engine pipeline
      v1  <= (state == C_RUN);
      f1  <= (ti_idx == 0) && (ci == 0) && (cj == 0);
      oa1 <= OAW'(32'(trr) * TC + 32'(tcc));
      v2 <= v1; f2 <= f1; oa2 <= oa1;
      v3 <= v2; f3 <= f2; oa3 <= oa2;

      // loader hand-off
      if (ld_start) ld_busy <= 1'b1;
      if (ld_done) begin
        ld_busy <= 1'b0;
        in_full[ld_set] <= 1'b1;
        ld_set <= ~ld_set;
        loads_issued <= loads_issued + 1;
      end

      // storer hand-off
      if (st_start) st_busy <= 1'b1;
      if (st_done) begin
        st_busy <= 1'b0;
        out_full[st_set] <= 1'b0;
        st_set <= ~st_set;
        stores_done <= stores_done + 1;
      end

      case (state)
        C_IDLE: begin
          if (start) begin
            cfg_q <= cfg;
            n_tiles_n   <= (32'(cfg.n) + TN - 1) / TN;
            n_out_tiles <= ((32'(cfg.r) + TR - 1) / TR) * ((32'(cfg.c) + TC - 1) / TC) *
                           ((32'(cfg.m) + TM - 1) / TM);
            n_loads     <= ((32'(cfg.r) + TR - 1) / TR) * ((32'(cfg.c) + TC - 1) / TC) *
                           ((32'(cfg.m) + TM - 1) / TM) * ((32'(cfg.n) + TN - 1) / TN);
            loads_issued <= '0;
            out_tiles_done <= '0;
            stores_done <= '0;
            ti_idx <= '0;
            in_full <= '0;
            out_full <= '0;
            busy <= 1'b1;
            state <= C_WAIT;
          end
        end
        C_WAIT: begin
          if (out_tiles_done == n_out_tiles) begin
            if (stores_done == n_out_tiles && !st_busy) begin
              busy <= 1'b0;
              done <= 1'b1;
              state <= C_IDLE;
            end
          end else if (go) begin
            ci <= '0; cj <= '0; trr <= '0; tcc <= '0;
            state <= C_RUN;
          end
        end
        C_RUN: begin
          if (last_point) begin
            dcnt <= '0;
            state <= C_DRAIN;
          end else if (tcc != 16'(TC - 1)) begin
            tcc <= tcc + 1'b1;
          end else begin
            tcc <= '0;
            if (trr != 16'(TR - 1)) trr <= trr + 1'b1;
            else begin
              trr <= '0;
              if (cj != cfg_q.k - 1) cj <= cj + 1'b1;
              else begin
                cj <= '0;
                ci <= ci + 1'b1;
              end
            end
          end
        end
        C_DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == 2'd2) begin
            in_full[cp_set] <= 1'b0;
            cp_set <= ~cp_set;
            if (ti_idx == n_tiles_n - 1) begin
              ti_idx <= '0;
              out_full[oc_set] <= 1'b1;
              oc_set <= ~oc_set;
              out_tiles_done <= out_tiles_done + 1;
            end else begin
              ti_idx <= ti_idx + 1;
            end
            state <= C_WAIT;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // a configuration the buffers cannot hold
  a_cfg: assert property (@(posedge clk) disable iff (!rst_n)
                          start && !busy |-> int'(cfg.k) >= 1 && int'(cfg.k) <= K_MAX &&
                                             int'(cfg.s) >= 1 && int'(cfg.s) <= S_MAX &&
                                             cfg.r != 0 && cfg.c != 0 && cfg.m != 0 && cfg.n != 0)
    else $error("controller: layer configuration out of range");

  initial begin
    assert (TR * TC >= 2) else $error("controller: Tr*Tc must be at least 2");
  end

endmodule
