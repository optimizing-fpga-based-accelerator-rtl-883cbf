// Self-checking testbench of compute_engine with Tm = 3, Tn = 5: the same random
// input words go to every PE, each PE gets its own weights and partial sum, and
// every PE's result, two cycles later, is compared with an independent model.
module tb_compute_engine;
  import fp_ref_pkg::*;

  localparam int TM = 3;
  localparam int TN = 5;
  localparam int NITEMS = 1000;

  logic clk = 1'b0;
  word_t [TN-1:0] x;
  word_t [TM-1:0][TN-1:0] w;
  word_t [TM-1:0] psum, acc_out;
  logic first;
  int checks = 0, failures = 0;
  word_t tree_q[$];

  compute_engine #(.TM(TM), .TN(TN)) dut (
    .clk(clk), .x(x), .w(w), .psum(psum), .first(first), .acc_out(acc_out));

  always #5 clk = ~clk;

  initial begin
    repeat (NITEMS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t leaves[$];
    word_t t[TM];
    word_t exp_v;
    for (int k = 0; k < NITEMS + 2; k++) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < TN; i++) x[i] = rand_fp();
      for (int m = 0; m < TM; m++) begin
        leaves = {};
        for (int i = 0; i < TN; i++) begin
          w[m][i] = rand_fp();
          leaves.push_back(fmul_ref(x[i], w[m][i]));
        end
        tree_q.push_back(tree_ref(leaves));
      end
      if (k >= 2) begin
        first = 1'($urandom);
        for (int m = 0; m < TM; m++) begin
          t[m] = tree_q.pop_front();
          psum[m] = rand_fp();
        end
        #2;
        for (int m = 0; m < TM; m++) begin
          exp_v = first ? t[m] : fadd_ref(t[m], psum[m]);
          checks++;
          if (acc_out[m] !== exp_v) begin
            failures++;
            if (failures < 10) $display("FAIL item %0d pe %0d: %h expected %h", k - 2, m, acc_out[m], exp_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
