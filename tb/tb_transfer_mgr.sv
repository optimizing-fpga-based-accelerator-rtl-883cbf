// Self-checking testbench of transfer_mgr with Tm = 2, Tn = 3, Tr = 2, Tc = 2.
//
// Loader: several tiles are streamed in with random gaps; every buffer write is
// checked against the expected bank, address and word (input words to input
// bank tii at row-major address, weight word (too, tii, k) to weight bank
// too*Tn + tii at address k), and ld_done must pulse once per tile after the last
// weight. Storer: the output buffer is modelled with a synchronous read; the
// output FIFO's fill count is modelled with random draining. The pushed words
// must come out in the order output map, row, column, never overflow the FIFO,
// and st_done must pulse after the last one. With the FIFO always drained, the
// storer must push one word per cycle.
module tb_transfer_mgr;
  import cnn_pkg::*;
  import fp_ref_pkg::*;

  localparam int TM = 2, TN = 3, TR = 2, TC = 2, IAW = 6, WAW = 4, OAW = 2, FDEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] in_words;
  logic [7:0] kk;
  logic ld_start = 1'b0, ld_done, ld_active, in_valid = 1'b0, in_ready;
  word_t in_data;
  logic [TN-1:0] ib_we;
  logic [IAW-1:0] ib_waddr;
  word_t [TN-1:0] ib_wdata;
  logic [TM*TN-1:0] wb_we;
  logic [WAW-1:0] wb_waddr;
  word_t [TM*TN-1:0] wb_wdata;
  logic st_start = 1'b0, st_done, st_active;
  logic [OAW-1:0] ob_raddr;
  word_t [TM-1:0] ob_rdata;
  logic out_valid;
  word_t out_data;
  logic [2:0] out_count = '0;

  transfer_mgr #(.TM(TM), .TN(TN), .TR(TR), .TC(TC), .IAW(IAW), .WAW(WAW), .OAW(OAW),
                 .FDEPTH(FDEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ld_done = 0, n_st_done = 0;
  // expected writes: kind (0 input, 1 weight), bank, address, data
  int exp_kind[$], exp_bank[$], exp_addr[$];
  word_t exp_data[$];
  word_t omem [TM][TR*TC];
  word_t exp_out[$];
  int drain_pct = 50;

  task automatic expect_eq(longint got, longint want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 15) $display("FAIL %s: %0h expected %0h", what, got, want);
    end
  endtask

  // output buffer model and FIFO fill model
  always @(posedge clk) begin
    for (int m = 0; m < TM; m++) ob_rdata[m] <= omem[m][ob_raddr];
  end
  // the FIFO count changes at the clock edge, like the real FIFO's
  bit pop_now = 1'b0;
  always @(posedge clk) out_count <= 3'(int'(out_count) + int'(out_valid) - int'(pop_now));
  always @(negedge clk) begin
    pop_now = (out_count != 0 && ($urandom % 100) < drain_pct);
    if (out_valid) begin
      expect_eq(int'(out_count < FDEPTH), 1, "storer pushes only when FIFO has room");
      if (exp_out.size() == 0) begin
        failures++;
        $display("FAIL extra output word");
      end else expect_eq(out_data, exp_out.pop_front(), "output word");
    end
    if (ld_done) n_ld_done++;
    if (st_done) n_st_done++;
    // buffer writes this cycle
    for (int b = 0; b < TN; b++) if (ib_we[b]) begin
      expect_eq(exp_kind.size() != 0 ? exp_kind[0] : -1, 0, "input write expected");
      expect_eq(b, exp_bank[0], "input bank");
      expect_eq(ib_waddr, exp_addr[0], "input address");
      expect_eq(ib_wdata[b], exp_data[0], "input word");
      void'(exp_kind.pop_front()); void'(exp_bank.pop_front());
      void'(exp_addr.pop_front()); void'(exp_data.pop_front());
    end
    for (int b = 0; b < TM*TN; b++) if (wb_we[b]) begin
      expect_eq(exp_kind.size() != 0 ? exp_kind[0] : -1, 1, "weight write expected");
      expect_eq(b, exp_bank[0], "weight bank");
      expect_eq(wb_waddr, exp_addr[0], "weight address");
      expect_eq(wb_wdata[b], exp_data[0], "weight word");
      void'(exp_kind.pop_front()); void'(exp_bank.pop_front());
      void'(exp_addr.pop_front()); void'(exp_data.pop_front());
    end
  end

  task automatic load_tile(int K, int S, int gap);
    int iw = (TC - 1) * S + K, ih = (TR - 1) * S + K;
    word_t q[$];
    bit take = 0;
    int idx = 0, n_before = n_ld_done;
    in_words = 32'(ih * iw);
    kk = 8'(K * K);
    for (int b = 0; b < TN; b++)
      for (int a = 0; a < ih * iw; a++) begin
        word_t v = word_t'($urandom);
        q.push_back(v);
        exp_kind.push_back(0); exp_bank.push_back(b); exp_addr.push_back(a); exp_data.push_back(v);
      end
    for (int too = 0; too < TM; too++)
      for (int tii = 0; tii < TN; tii++)
        for (int a = 0; a < K * K; a++) begin
          word_t v = word_t'($urandom);
          q.push_back(v);
          exp_kind.push_back(1); exp_bank.push_back(too * TN + tii); exp_addr.push_back(a);
          exp_data.push_back(v);
        end
    @(negedge clk) ld_start = 1'b1;
    @(negedge clk) ld_start = 1'b0;
    while (idx < q.size()) begin
      if (take) idx++;
      if (idx == q.size()) in_valid = 1'b0;
      else if (take || !in_valid) begin
        in_valid = ($urandom % 100) >= gap;
        in_data = q[idx];
      end
      #1 take = in_valid && in_ready;
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    expect_eq(exp_kind.size(), 0, "all tile words written");
    expect_eq(n_ld_done, n_before + 1, "one ld_done per tile");
    expect_eq(ld_active, 0, "loader idle after tile");
  endtask

  task automatic store_tile(int pct);
    int n_before = n_st_done, t0, cycles;
    drain_pct = pct;
    for (int m = 0; m < TM; m++)
      for (int a = 0; a < TR * TC; a++) begin
        omem[m][a] = word_t'($urandom);
        exp_out.push_back(omem[m][a]);
      end
    @(negedge clk) st_start = 1'b1;
    t0 = $time;
    @(negedge clk) st_start = 1'b0;
    while (n_st_done == n_before) @(negedge clk);
    cycles = ($time - t0) / 10;
    expect_eq(exp_out.size(), 0, "all output words pushed");
    // one word per cycle after start-up: start, bank read, push, done pulse
    if (pct == 100) expect_eq(cycles, TM * TR * TC + 3, "storer cycles at full rate");
    repeat (FDEPTH + 2) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_words = '0; kk = '0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    load_tile(3, 1, 0);
    load_tile(2, 2, 50);
    load_tile(1, 1, 20);
    store_tile(100);
    store_tile(30);
    store_tile(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
