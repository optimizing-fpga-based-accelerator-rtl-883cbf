// End-to-end testbench of accel_top at reduced size (Tm = 4, Tn = 3, Tr = 3,
// Tc = 4, kernels up to 5, strides up to 2, FIFOs of 8 words).
//
// Runs several layers back to back through the streaming ports, with random gaps
// on the input side and random back-pressure on the output side, and compares
// every real output pixel with the reference model. It also checks that each
// tile computes in K*K*Tr*Tc cycles, that `irq` pulses once per layer, and that
// each mechanism of the design happens at least once: computation overlapped
// with loading, the engine waiting for input, the engine waiting for an output
// set to drain, a full input FIFO, output back-pressure, accumulation over
// several input-map tiles, several output tiles (output ping-pong), edge tiles
// with padding, and stride above one.
module tb_accel_top;
  import cnn_pkg::*;
  import fp_ref_pkg::*;
  import conv_ref_pkg::*;

  localparam int TM = 4, TN = 3, TR = 3, TC = 4, K_MAX = 5, S_MAX = 2, FDEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  layer_cfg_t cfg;
  logic start = 1'b0, busy, irq;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  word_t in_data = '0, out_data;
  logic perf_overlap, perf_in_stall, perf_out_stall;

  accel_top #(.TM(TM), .TN(TN), .TR(TR), .TC(TC), .K_MAX(K_MAX), .S_MAX(S_MAX),
              .FDEPTH(FDEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_overlap = 0, n_in_stall = 0, n_out_stall = 0, n_fifo_full = 0, n_backpressure = 0;
  int n_multi_ti = 0, n_multi_out = 0, n_padded = 0, n_stride = 0, n_irq = 0;
  int in_gap_pct = 0, out_stall_pct = 0;
  int run_len = 0;

  always @(negedge clk) begin
    if (perf_overlap) n_overlap++;
    if (perf_in_stall) n_in_stall++;
    if (perf_out_stall) n_out_stall++;
    if (in_valid && !in_ready) n_fifo_full++;
    if (out_valid && !out_ready) n_backpressure++;
    if (irq) n_irq++;
  end

  // a tile's compute phase must last exactly K*K*Tr*Tc cycles
  always @(negedge clk) begin
    if (int'(dut.u_ctrl.state) == 2) run_len++;  // C_RUN
    else if (run_len != 0) begin
      checks++;
      if (run_len != int'(cfg.k) * int'(cfg.k) * TR * TC) begin
        failures++;
        $display("FAIL t=%0t tile compute took %0d cycles, expected %0d", $time, run_len,
                 int'(cfg.k) * int'(cfg.k) * TR * TC);
      end
      run_len = 0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(int R, int C, int M, int N, int K, int S, int gap, int bp);
    word_t in_q[$], exp_q[$];
    bit care_q[$];
    int nexp, got, irq_before;
    build_layer(TM, TN, TR, TC, R, C, M, N, K, S, in_q, exp_q, care_q);
    nexp = exp_q.size();
    in_gap_pct = gap;
    out_stall_pct = bp;
    irq_before = n_irq;
    if (N > TN) n_multi_ti++;
    if (exp_q.size() > TM * TR * TC) n_multi_out++;
    if (care_q.size() != 0 && (R % TR != 0 || C % TC != 0 || M % TM != 0)) n_padded++;
    if (S > 1) n_stride++;
    @(negedge clk);
    cfg = '{r: 12'(R), c: 12'(C), m: 12'(M), n: 12'(N), k: 4'(K), s: 3'(S)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    fork
      begin : feed
        int idx = 0;
        bit take = 1'b0;
        while (idx < in_q.size()) begin
          @(negedge clk);
          if (take) idx++;
          if (idx == in_q.size()) in_valid = 1'b0;
          else if (take || !in_valid) begin
            in_valid = ($urandom % 100) >= gap;
            in_data = in_q[idx];
          end
          #1 take = in_valid && in_ready;
        end
      end
      begin : drain
        bit take;
        word_t word;
        got = 0;
        while (got < nexp) begin
          @(negedge clk);
          out_ready = ($urandom % 100) >= bp;
          #1;
          take = out_valid && out_ready;
          word = out_data;
          if (take) begin
            if (care_q[got]) begin
              checks++;
              if (word !== exp_q[got]) begin
                failures++;
                if (failures < 10) $display("FAIL layer R%0d C%0d M%0d N%0d K%0d S%0d word %0d: %h expected %h",
                                            R, C, M, N, K, S, got, word, exp_q[got]);
              end
            end
            got++;
          end
        end
        @(negedge clk);
        out_ready = 1'b0;
      end
    join
    repeat (10) @(posedge clk);
    checks++;
    if (busy || n_irq != irq_before + 1) begin
      failures++;
      $display("FAIL layer end: busy=%0d irq pulses=%0d", busy, n_irq - irq_before);
    end
  endtask

  task automatic need(int count, string what);
    checks++;
    $display("mechanism %-28s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    cfg = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    //        R  C  M   N  K  S  in-gap% out-stall%
    run_layer(3, 4, 4,  3, 3, 1,  0,  0);    // one tile, no padding
    run_layer(5, 6, 6,  7, 3, 1, 10, 30);    // edge tiles, 3 ti tiles, 2 to tiles
    run_layer(4, 5, 9,  5, 5, 2,  0, 80);    // stride 2, slow output
    run_layer(6, 8, 8,  2, 1, 1,  0, 90);    // 1x1 kernel, output-bound
    run_layer(3, 4, 4, 10, 2, 2, 60,  0);    // input-bound
    need(n_overlap,      "compute/load overlap");
    need(n_in_stall,     "engine waits for input");
    need(n_out_stall,    "engine waits for output set");
    need(n_fifo_full,    "input FIFO full");
    need(n_backpressure, "output back-pressure");
    need(n_multi_ti,     "accumulation over ti tiles");
    need(n_multi_out,    "several output tiles");
    need(n_padded,       "edge tile padding");
    need(n_stride,       "stride above one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
