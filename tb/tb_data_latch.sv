// tb_data_latch: self-checking test of the one-word holding latch.
//
// Random writes and reads are applied; a one-entry model kept here predicts
// the held word, the full flag and the overrun pulse, which are compared
// every clock. Reads are only issued while the latch is full.
module tb_data_latch;
  localparam int W = 16;

  logic clk = 0, rst_n = 0;
  logic wr = 0, rd = 0;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  logic full, overrun;

  data_latch dut (.*);

  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  int overruns = 0, same_clock = 0;
  logic [W-1:0] m_q = '0;
  logic m_full = 0, m_ovr = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(full == 0, "full after reset");
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr = ($urandom_range(0, 2) == 0);
      d  = W'($urandom);
      rd = full && ($urandom_range(0, 3) == 0);
      @(posedge clk);
      // model
      m_ovr = wr && m_full && !rd;
      if (m_ovr) overruns++;
      if (wr && rd) same_clock++;
      if (wr && (!m_full || rd)) begin m_q = d; m_full = 1; end
      else if (rd) m_full = 0;
      #1;
      check(full == m_full, "full flag");
      check(overrun == m_ovr, "overrun pulse");
      if (m_full) check(q == m_q, $sformatf("held word %h exp %h", q, m_q));
    end
    check(overruns > 0, "no overrun exercised");
    check(same_clock > 0, "no same-clock read and write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
