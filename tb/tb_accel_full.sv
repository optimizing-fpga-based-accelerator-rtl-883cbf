// Full-size testbench of accel_top with every parameter at its default (Tm = 64,
// Tn = 7, Tr = Tc = 13, kernels up to 11, strides up to 4, 16-word FIFOs).
//
// Runs two complete layers through the streaming ports: a 3x3 layer with two
// input-map tiles (accumulation across tiles, loading overlapped with computing)
// and an 11x11 stride-4 layer like the first layer of AlexNet, reduced to one
// 13x13 output tile of 64 maps. Every real output pixel is compared with the
// reference model, every tile's compute phase must take K*K*Tr*Tc cycles, and
// `irq` must pulse once per layer.
module tb_accel_full;
  import cnn_pkg::*;
  import fp_ref_pkg::*;
  import conv_ref_pkg::*;

  localparam int TM = 64, TN = 7, TR = 13, TC = 13;

  logic clk = 1'b0, rst_n = 1'b0;
  layer_cfg_t cfg;
  logic start = 1'b0, busy, irq;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  word_t in_data = '0, out_data;
  logic perf_overlap, perf_in_stall, perf_out_stall;

  accel_top dut (.*);

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
    repeat (2000000) @(posedge clk);
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
    //         R   C   M   N   K  S  in-gap% out-stall%
    run_layer(13, 13, 64, 14,  3, 1,  0, 20);
    run_layer(13, 13, 64,  3, 11, 4,  0,  0);
    need(n_overlap,      "compute/load overlap");
    need(n_multi_ti,     "accumulation over ti tiles");
    need(n_stride,       "stride above one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
