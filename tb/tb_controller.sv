// Self-checking testbench of controller with Tm = 2, Tn = 2, Tr = 2, Tc = 3.
//
// The transfer manager is modelled by the testbench: a load finishes a random
// number of cycles after ld_start, a store likewise after st_start. The
// testbench enumerates the expected point sequence independently (tile loops
// row, col, to, ti; point loops i, j, trr, tcc) and checks, for every issued
// point, the input and weight buffer addresses and the buffer sets used; for
// every write-back, the output address, set and `first` flag. It also checks the
// number of loads and stores, that no set is used while being filled or drained,
// the K*K*Tr*Tc + 4 cycles per tile when loads are instant, and the `done` pulse.
module tb_controller;
  import cnn_pkg::*;

  localparam int TM = 2, TN = 2, TR = 2, TC = 3, K_MAX = 3, S_MAX = 2;
  localparam int IAW = 6, WAW = 4, OAW = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  layer_cfg_t cfg;
  logic busy, done, ld_start, ld_set, ld_done = 1'b0, st_start, st_set, st_done = 1'b0;
  logic [31:0] in_words;
  logic [7:0] kk;
  logic cp_act, cp_set, oc_act, oc_set, out_we, first;
  logic [IAW-1:0] in_raddr;
  logic [WAW-1:0] w_raddr;
  logic [OAW-1:0] out_raddr, out_waddr;
  logic ev_overlap, ev_in_stall, ev_out_stall;

  controller #(.TM(TM), .TN(TN), .TR(TR), .TC(TC), .K_MAX(K_MAX), .S_MAX(S_MAX),
               .IAW(IAW), .WAW(WAW), .OAW(OAW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ld = 0, n_st = 0, n_done = 0, ld_wait = 0, st_wait = 0, max_ld = 0, max_st = 0;
  bit ld_pend = 0, st_pend = 0, ld_pset, st_pset;
  bit set_loaded[2], set_ready_out[2];
  // expected issue sequence: {in addr, w addr, out addr, first, tile number}
  int exp_in[$], exp_w[$], exp_o[$], exp_f[$], exp_wr_o[$], exp_wr_f[$];
  int ex_tile[$];
  int tile_no = 0;
  int wr_tile[$];

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 15) $display("FAIL %s: %0d expected %0d", what, got, want);
    end
  endtask

  // transfer manager model
  always @(negedge clk) begin
    ld_done = 1'b0;
    st_done = 1'b0;
    if (ld_pend) begin
      if (ld_wait == 0) begin ld_done = 1'b1; ld_pend = 0; end
      else ld_wait--;
    end
    if (st_pend) begin
      if (st_wait == 0) begin st_done = 1'b1; st_pend = 0; end
      else st_wait--;
    end
    #1;
    if (ld_start) begin
      n_ld++;
      ld_pend = 1; ld_pset = ld_set;
      ld_wait = (max_ld == 0) ? 0 : $urandom % max_ld;
      // the set being loaded must not be the one being computed on
      if (cp_act) expect_eq(int'(ld_set != cp_set), 1, "load set differs from compute set");
    end
    if (st_start) begin
      n_st++;
      st_pend = 1; st_pset = st_set;
      st_wait = (max_st == 0) ? 0 : $urandom % max_st;
      if (oc_act) expect_eq(int'(st_set != oc_set), 1, "store set differs from compute set");
    end
    if (done) n_done++;
  end

  // check issued points (v1 is the cycle after issue; compare addresses at issue)
  always @(negedge clk) begin
    if (int'(dut.state) == 2) begin  // C_RUN: one point issued this cycle
      if (exp_in.size() == 0) begin
        failures++;
        $display("FAIL extra point issued");
      end else begin
        expect_eq(int'(in_raddr), exp_in.pop_front(), "input buffer address");
        expect_eq(int'(w_raddr), exp_w.pop_front(), "weight buffer address");
        void'(exp_o.pop_front());
        void'(exp_f.pop_front());
      end
    end
    if (out_we) begin
      if (exp_wr_o.size() == 0) begin
        failures++;
        $display("FAIL extra write-back");
      end else begin
        expect_eq(int'(out_waddr), exp_wr_o.pop_front(), "output write address");
        expect_eq(int'(first), exp_wr_f.pop_front(), "first flag");
        expect_eq(int'(oc_act), 1, "output set owned during write-back");
      end
    end
  end

  task automatic run(int R, int C, int M, int N, int K, int S, int mld, int mst, bit timing);
    int nr = (R + TR - 1) / TR, nc = (C + TC - 1) / TC, nm = (M + TM - 1) / TM, nn = (N + TN - 1) / TN;
    int IW = (TC - 1) * S + K;
    int t0, cycles;
    max_ld = mld; max_st = mst;
    for (int t = 0; t < nr * nc * nm * nn; t++)
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++)
          for (int trr = 0; trr < TR; trr++)
            for (int tcc = 0; tcc < TC; tcc++) begin
              exp_in.push_back((trr * S + i) * IW + tcc * S + j);
              exp_w.push_back(i * K + j);
              exp_o.push_back(trr * TC + tcc);
              exp_f.push_back((t % nn) == 0 && i == 0 && j == 0);
              exp_wr_o.push_back(trr * TC + tcc);
              exp_wr_f.push_back((t % nn) == 0 && i == 0 && j == 0);
            end
    n_ld = 0; n_st = 0; n_done = 0;
    @(negedge clk);
    cfg = '{r: 12'(R), c: 12'(C), m: 12'(M), n: 12'(N), k: 4'(K), s: 3'(S)};
    start = 1'b1;
    t0 = $time;
    @(negedge clk);
    start = 1'b0;
    while (!(n_done == 1)) @(negedge clk);
    cycles = ($time - t0) / 10;
    expect_eq(exp_in.size(), 0, "all points issued");
    expect_eq(exp_wr_o.size(), 0, "all points written back");
    expect_eq(n_ld, nr * nc * nm * nn, "number of tile loads");
    expect_eq(n_st, nr * nc * nm, "number of output tile stores");
    expect_eq(int'(busy), 0, "idle after done");
    if (timing) begin
      // loads take 2 cycles here and stores 2: the engine never waits after the first load
      $display("layer took %0d cycles for %0d tiles of %0d points", cycles, nr*nc*nm*nn, K*K*TR*TC);
      expect_eq(int'(cycles <= nr*nc*nm*nn * (K*K*TR*TC + 4) + 12), 1, "cycles within tiles*(K*K*Tr*Tc+P)+fill");
      expect_eq(int'(cycles >= nr*nc*nm*nn * (K*K*TR*TC + 4)), 1, "cycles at least tiles*(K*K*Tr*Tc+P)");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(2, 3, 2, 2, 3, 1, 0, 0, 1);      // single tile
    run(4, 6, 4, 4, 2, 2, 0, 0, 1);      // 2x2x2 output tiles, 2 ti tiles
    run(3, 5, 3, 5, 3, 1, 40, 60, 0);    // slow transfers, edge tiles
    run(4, 3, 2, 3, 1, 2, 5, 200, 0);    // stores slower than compute
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
