// tb_ctrl_unit_a: self-checking test of control unit A.
//
// The settings are written through a model of link adaptor A's parallel side
// (three-byte frames, valid/acknowledge). A free-running START_SAMPLE clock,
// unrelated to the logic clock, runs throughout; REV_START pulses open scans.
// For each scan the test counts START_SAMPLE edges since REV_START and checks
// that exactly NUM_SAMPLES requests are issued, the first on edge
// START_DELAY + 1, and that scan_done pulses once at the end. It also checks
// a restart in mid scan, a scan with zero samples, that nothing happens
// while disabled, and that an unknown register number changes nothing.
module tb_ctrl_unit_a;
  import qdi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start_sample = 0, rev_start = 0;
  logic [7:0] la_data = '0;
  logic la_valid = 0;
  logic la_ack;
  logic sample_req, scan_active, scan_done, scan_restart;
  cnt_t num_samples, start_delay;
  logic enable;

  ctrl_unit_a dut (.*);

  always #25 clk = ~clk;
  // external sample clock: 2.5 MHz, not a multiple of the logic clock period
  always #213ns start_sample = ~start_sample;

  int checks = 0, failures = 0;
  int edges = 0, reqs = 0, first_edge = -1, last_edge = -1, dones = 0, restarts = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge start_sample) edges++;
  always @(posedge clk) if (rst_n) begin
    if (sample_req) begin
      reqs++;
      if (first_edge < 0) first_edge = edges;
      last_edge = edges;
    end
    if (scan_done) dones++;
    if (scan_restart) restarts++;
  end

  task automatic link_byte(logic [7:0] b);
    @(negedge clk);
    la_data = b; la_valid = 1;
    do @(posedge clk); while (!la_ack);
    @(negedge clk) la_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic write_reg(logic [7:0] r, logic [15:0] v);
    link_byte(r); link_byte(v[7:0]); link_byte(v[15:8]);
  endtask

  // REV_START, placed midway between two sample clock edges.
  task automatic pulse_rev;
    @(posedge start_sample);
    #100ns rev_start = 1;
    #100ns rev_start = 0;
    edges = 0; reqs = 0; first_edge = -1; last_edge = -1; dones = 0;
  endtask

  task automatic full_scan(int n, int d);
    write_reg(REG_NUM_SAMPLES, 16'(n));
    write_reg(REG_START_DELAY, 16'(d));
    check(num_samples == cnt_t'(n) && start_delay == cnt_t'(d), "register readback");
    pulse_rev();
    repeat (n + d + 4) @(posedge start_sample);
    repeat (4) @(posedge clk);
    check(reqs == n, $sformatf("requests %0d exp %0d", reqs, n));
    if (n > 0) begin
      check(first_edge == d + 1, $sformatf("first request on edge %0d exp %0d", first_edge, d + 1));
      check(last_edge == d + n, $sformatf("last request on edge %0d exp %0d", last_edge, d + n));
    end
    check(dones == ((n > 0) ? 1 : 0), $sformatf("scan_done pulses %0d", dones));
    check(!scan_active, "scan still active");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // disabled: nothing happens
    write_reg(REG_NUM_SAMPLES, 16'd5);
    pulse_rev();
    repeat (10) @(posedge start_sample);
    check(reqs == 0 && !scan_active, "activity while disabled");
    write_reg(REG_CONTROL, 16'd1);
    check(enable, "enable bit");
    full_scan(5, 0);
    full_scan(12, 3);
    full_scan(1, 7);
    full_scan(0, 2);
    full_scan(40, 1);
    // unknown register changes nothing
    write_reg(8'h55, 16'hABCD);
    check(num_samples == cnt_t'(40) && start_delay == cnt_t'(1) && enable, "unknown register");
    // restart in mid scan
    write_reg(REG_NUM_SAMPLES, 16'd20);
    write_reg(REG_START_DELAY, 16'd0);
    restarts = 0;
    pulse_rev();
    repeat (8) @(posedge start_sample);
    pulse_rev();
    repeat (25) @(posedge start_sample);
    repeat (4) @(posedge clk);
    check(restarts == 1, $sformatf("restarts %0d", restarts));
    check(reqs == 20 && first_edge == 1 && dones == 1, $sformatf("scan after restart: %0d requests", reqs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
