// AlexNet workload testbench: accel_top at its default parameters (Tm = 64,
// Tn = 7, Tr = Tc = 13) runs the convolutional layers of AlexNet, whole where
// the simulation time allows and as a band of output rows otherwise:
//   conv3            13x13 outputs, M 384, N 256, K 3      whole layer
//   conv4 (1 group)  13x13 outputs, M 192, N 192, K 3      whole layer
//   conv5 (1 group)  13x13 outputs, M 128, N 192, K 3      whole layer
//   conv2 (1 group)  rows 0-12 of 27x27, M 64 of 128, N 48, K 5
//   conv1            rows 0-12 of 55x55, M 96, N 3, K 11, stride 4
// The layer shapes are the standard AlexNet ones (conv2, conv4 and conv5 split
// into two groups). Inputs and weights are random; the host's zero padding is
// not modelled, so the border words are random too, which the datapath treats
// like any other input.
//
// The input stream is offered every cycle and the output is always accepted,
// so each layer is bound by the one-word input stream. Checked: every real
// output pixel bit for bit against the reference model; every tile's compute
// phase K*K*Tr*Tc cycles; one irq per layer; and the layer's time from start
// to irq lies between the number of input words and that number plus the
// compute of one tile, the drain of one output tile, 4 cycles per tile for the
// loader to turn round and a small margin: transfer and computation overlap as
// intended, and the layer runs at the rate of its input stream.
module tb_alexnet;
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
  int n_irq = 0, n_overlap = 0;
  int run_len = 0;
  longint cycle = 0;

  always @(negedge clk) begin
    cycle++;
    if (irq) n_irq++;
    if (perf_overlap) n_overlap++;
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
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(string name, int R, int C, int M, int N, int K, int S);
    word_t in_q[$], exp_q[$];
    bit care_q[$];
    int nexp, got, irq_before, bad, ntiles;
    longint t0, t1, lo, hi;
    build_layer(TM, TN, TR, TC, R, C, M, N, K, S, in_q, exp_q, care_q);
    nexp = exp_q.size();
    irq_before = n_irq;
    bad = failures;
    @(negedge clk);
    cfg = '{r: 12'(R), c: 12'(C), m: 12'(M), n: 12'(N), k: 4'(K), s: 3'(S)};
    start = 1'b1;
    t0 = cycle;
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
          else begin
            in_valid = 1'b1;
            in_data = in_q[idx];
          end
          #1 take = in_valid && in_ready;
        end
      end
      begin : drain
        got = 0;
        while (got < nexp) begin
          @(negedge clk);
          out_ready = 1'b1;
          #1;
          if (out_valid) begin
            if (care_q[got]) begin
              checks++;
              if (out_data !== exp_q[got]) begin
                failures++;
                if (failures < 10) $display("FAIL %s word %0d: %h expected %h",
                                            name, got, out_data, exp_q[got]);
              end
            end
            got++;
          end
        end
      end
      begin : wait_irq
        while (n_irq == irq_before) @(negedge clk);
        t1 = cycle;
      end
    join
    @(negedge clk);
    out_ready = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (busy || n_irq != irq_before + 1) begin
      failures++;
      $display("FAIL %s end: busy=%0d irq pulses=%0d", name, busy, n_irq - irq_before);
    end
    lo = in_q.size();
    ntiles = cdiv(R, TR) * cdiv(C, TC) * cdiv(M, TM) * cdiv(N, TN);
    hi = lo + 4 * ntiles + K * K * TR * TC + TM * TR * TC + 64;
    checks++;
    if (t1 - t0 < lo || t1 - t0 > hi) begin
      failures++;
      $display("FAIL %s took %0d cycles, expected %0d to %0d", name, t1 - t0, lo, hi);
    end
    $display("%-6s R%0d C%0d M%0d N%0d K%0d S%0d: %0d input words, %0d cycles, %0d output words, %0d failures",
             name, R, C, M, N, K, S, in_q.size(), t1 - t0, nexp, failures - bad);
  endtask

  initial begin
    cfg = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    //              R   C    M    N   K  S
    run_layer("conv5", 13, 13, 128, 192, 3, 1);
    run_layer("conv4", 13, 13, 192, 192, 3, 1);
    run_layer("conv3", 13, 13, 384, 256, 3, 1);
    run_layer("conv2", 13, 27,  64,  48, 5, 1);
    run_layer("conv1", 13, 55,  96,   3, 11, 4);
    checks++;
    if (n_overlap == 0) begin
      failures++;
      $display("FAIL loading never overlapped computing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
