// Self-checking testbench of stream_fifo (depth 4): random valid and ready on
// both sides, holding offered words until accepted; checks data order, the fill
// count, that it accepts exactly while not full, and that it fills up and empties.
module tb_stream_fifo;
  import fp_ref_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid, s_ready, m_valid, m_ready;
  word_t s_data, m_data;
  logic [2:0] count;
  word_t model[$];
  int checks = 0, failures = 0, full_seen = 0, empty_seen = 0;
  logic held = 1'b0;

  stream_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, got, want);
    end
  endtask

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 1'b0; m_ready = 1'b0; s_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      // check state before the edge
      expect_eq(32'(count), 32'(model.size()), "count");
      expect_eq(32'(s_ready), 32'(model.size() < DEPTH), "s_ready");
      expect_eq(32'(m_valid), 32'(model.size() != 0), "m_valid");
      if (model.size() != 0) expect_eq(m_data, model[0], "m_data");
      if (model.size() == DEPTH) full_seen++;
      if (model.size() == 0) empty_seen++;
      // choose this cycle's handshakes (phases alternate to reach full and empty)
      m_ready = ((k / 200) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      if (!held) begin
        s_valid = 1'($urandom);
        s_data = word_t'($urandom);
      end
      #1;
      @(posedge clk);
      held = s_valid && !s_ready;
      if (m_valid && m_ready) void'(model.pop_front());
      if (s_valid && s_ready) model.push_back(s_data);
    end
    expect_eq(32'(full_seen > 0), 1, "reached full");
    expect_eq(32'(empty_seen > 0), 1, "reached empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
