// Self-checking testbench of crossbar with 2 banks: random activity and set
// selections on both sides (never both active on the same set), checking which
// side's port each set receives and which set each side reads.
module tb_crossbar;
  import fp_ref_pkg::*;

  localparam int NB = 2;
  localparam int AW = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic act_a, sel_a, act_b, sel_b;
  logic [NB-1:0] we_a, we_b;
  logic [AW-1:0] waddr_a, raddr_a, waddr_b, raddr_b;
  word_t [NB-1:0] wdata_a, wdata_b, rdata_a, rdata_b;
  logic [1:0][NB-1:0] set_we;
  logic [1:0][AW-1:0] set_waddr, set_raddr;
  word_t [1:0][NB-1:0] set_wdata, set_rdata;
  int checks = 0, failures = 0;

  crossbar #(.NB(NB), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(logic [127:0] got, logic [127:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, got, want);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      act_a = 1'($urandom); sel_a = 1'($urandom);
      act_b = 1'($urandom); sel_b = act_a ? ~sel_a : 1'($urandom);
      we_a = NB'($urandom); we_b = NB'($urandom);
      waddr_a = AW'($urandom); raddr_a = AW'($urandom);
      waddr_b = AW'($urandom); raddr_b = AW'($urandom);
      for (int b = 0; b < NB; b++) begin
        wdata_a[b] = word_t'($urandom); wdata_b[b] = word_t'($urandom);
        set_rdata[0][b] = word_t'($urandom); set_rdata[1][b] = word_t'($urandom);
      end
      #1;
      for (int s = 0; s < 2; s++) begin
        if (act_a && sel_a == s) begin
          expect_eq(128'(set_we[s]), 128'(we_a), "we from A");
          expect_eq(128'(set_waddr[s]), 128'(waddr_a), "waddr from A");
          expect_eq(128'(set_raddr[s]), 128'(raddr_a), "raddr from A");
          expect_eq(128'(set_wdata[s]), 128'(wdata_a), "wdata from A");
        end else if (act_b && sel_b == s) begin
          expect_eq(128'(set_we[s]), 128'(we_b), "we from B");
          expect_eq(128'(set_waddr[s]), 128'(waddr_b), "waddr from B");
          expect_eq(128'(set_raddr[s]), 128'(raddr_b), "raddr from B");
          expect_eq(128'(set_wdata[s]), 128'(wdata_b), "wdata from B");
        end else begin
          expect_eq(128'(set_we[s]), 128'(0), "idle set written");
        end
      end
      expect_eq(128'(rdata_a), 128'(set_rdata[sel_a]), "A read data");
      expect_eq(128'(rdata_b), 128'(set_rdata[sel_b]), "B read data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
