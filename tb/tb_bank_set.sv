// Self-checking testbench of bank_set with 3 banks of 20 words: random writes
// with random per-bank enables and random reads, checked against a model one
// cycle later (synchronous read; a read of an address written in the same cycle
// returns the old word).
module tb_bank_set;
  import fp_ref_pkg::*;

  localparam int NB = 3;
  localparam int DEPTH = 20;
  localparam int AW = 5;

  logic clk = 1'b0;
  logic [NB-1:0] we;
  logic [AW-1:0] waddr, raddr;
  word_t [NB-1:0] wdata, rdata;
  word_t model [NB][DEPTH];
  word_t expect_q [NB];
  int checks = 0, failures = 0;

  bank_set #(.NB(NB), .DEPTH(DEPTH), .AW(AW)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first
    for (int a = 0; a < DEPTH; a++) begin
      @(posedge clk); #1;
      we = '1; waddr = AW'(a); raddr = '0;
      for (int b = 0; b < NB; b++) begin
        wdata[b] = word_t'($urandom);
        model[b][a] = wdata[b];
      end
    end
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk); #1;
      if (k > 0) begin
        for (int b = 0; b < NB; b++) begin
          checks++;
          if (rdata[b] !== expect_q[b]) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d bank %0d: %h expected %h", k, b, rdata[b], expect_q[b]);
          end
        end
      end
      we = NB'($urandom);
      waddr = AW'($urandom % DEPTH);
      raddr = ($urandom % 4 == 0) ? waddr : AW'($urandom % DEPTH);
      for (int b = 0; b < NB; b++) begin
        wdata[b] = word_t'($urandom);
        expect_q[b] = model[b][raddr];
      end
      for (int b = 0; b < NB; b++) if (we[b]) model[b][waddr] = wdata[b];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
