// Self-checking testbench of pe at its default Tn = 7: a new random set of inputs
// and weights every cycle; two cycles later the accumulated result is compared
// with an independently computed product, adder tree and accumulation, for both
// values of `first`. This also checks the two-cycle latency.
module tb_pe;
  import fp_ref_pkg::*;

  localparam int TN = 7;
  localparam int NITEMS = 3000;

  logic clk = 1'b0;
  word_t [TN-1:0] x, w;
  word_t psum, acc_out;
  logic first;
  int checks = 0, failures = 0;
  word_t tree_q[$];

  pe #(.TN(TN)) dut (.clk(clk), .x(x), .w(w), .psum(psum), .first(first), .acc_out(acc_out));

  always #5 clk = ~clk;

  initial begin
    repeat (NITEMS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t leaves[$];
    word_t t, exp_v;
    for (int k = 0; k < NITEMS + 2; k++) begin
      @(posedge clk);
      #1;
      leaves = {};
      for (int i = 0; i < TN; i++) begin
        x[i] = rand_fp();
        w[i] = rand_fp();
        leaves.push_back(fmul_ref(x[i], w[i]));
      end
      tree_q.push_back(tree_ref(leaves));
      if (k >= 2) begin
        t = tree_q.pop_front();
        psum  = rand_fp();
        first = 1'($urandom);
        #2;
        exp_v = first ? t : fadd_ref(t, psum);
        checks++;
        if (acc_out !== exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL item %0d: %h expected %h", k - 2, acc_out, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
