// tb_fir_filter: self-checking test of the FIR engine.
//
// The testbench plays both latches. It loads the band-pass coefficients,
// feeds random 12-bit samples (and a burst of full-scale 16-bit words with
// large coefficients to reach saturation), and compares every output with a
// bit-exact reference computed here from the sample history. It checks that
// each result appears exactly NTAPS + 7 clocks after its input is taken, that
// a continuous stream gives one result per NTAPS + 7 clocks, and that a full
// output latch holds the result back without losing it.
module tb_fir_filter;
  import qdi_pkg::*;
  import qdi_tb_pkg::*;

  localparam int NTAPS = 31;
  localparam int LAT   = NTAPS + 7;
  localparam int AW    = $clog2(NTAPS);

  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [AW-1:0] coef_addr = '0;
  coef_t coef_data = '0;
  logic in_full = 0;
  data_t in_data = '0;
  logic in_rd;
  logic out_full = 0;
  logic out_wr;
  data_t out_data;
  logic busy, stall;

  fir_filter dut (.*);

  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  int h [NTAPS];
  int hist [$];
  int exp_q [$];
  longint t_in [$];
  longint cyc = 0;
  int stalls = 0, saturations = 0, outputs = 0;
  longint last_in = -1;
  int min_gap = 1 << 30;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // Reference: record each sample taken and its expected output.
  always @(posedge clk) if (rst_n && in_rd) begin
    automatic longint acc = 0;
    int e;
    hist.push_front(int'(in_data));
    for (int k = 0; k < NTAPS; k++)
      if (k < hist.size()) acc += longint'(hist[k]) * longint'(h[k]);
    e = round_sat(acc);
    if (e == 32767 || e == -32768) saturations++;
    exp_q.push_back(e);
    t_in.push_back(cyc);
    if (last_in >= 0 && cyc - last_in < longint'(min_gap)) min_gap = int'(cyc - last_in);
    last_in = cyc;
  end

  always @(posedge clk) if (rst_n) begin
    if (stall) stalls++;
    if (out_wr) begin
      int e;
      longint t;
      outputs++;
      e = exp_q.pop_front();
      t = t_in.pop_front();
      check(int'(out_data) == e, $sformatf("data got %0d exp %0d", out_data, e));
      if (!stall_test) check(cyc - t == longint'(LAT), $sformatf("latency %0d", cyc - t));
    end
  end

  bit stall_test = 0;

  task automatic load_coefs(bit big);
    for (int n = 0; n < NTAPS; n++) begin
      h[n] = big ? 32767 : band_pass_coef(n, NTAPS);
      @(negedge clk);
      coef_we = 1; coef_addr = AW'(n); coef_data = coef_t'(h[n]);
    end
    @(negedge clk) coef_we = 0;
  endtask

  // Present one sample and wait until it is taken.
  task automatic feed(int v);
    @(negedge clk);
    in_full = 1; in_data = data_t'(v);
    do @(posedge clk); while (!in_rd);
    @(negedge clk) in_full = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_coefs(0);
    repeat (NTAPS + 2) @(negedge clk);
    // isolated samples: exact latency
    for (int i = 0; i < 60; i++) begin
      feed($signed($urandom_range(0, 4095)) - 2048);
      repeat ($urandom_range(LAT, LAT + 10)) @(negedge clk);
    end
    // continuous stream: rate
    min_gap = 1 << 30;
    last_in = -1;
    @(negedge clk);
    in_full = 1;
    for (int i = 0; i < 40; i++) begin
      in_data = data_t'($signed($urandom_range(0, 4095)) - 2048);
      do @(posedge clk); while (!in_rd);
      @(negedge clk);
    end
    in_full = 0;
    repeat (LAT + 5) @(negedge clk);
    check(min_gap == LAT, $sformatf("back-to-back period %0d", min_gap));
    // output latch held full: results must wait, not be lost
    stall_test = 1;
    for (int i = 0; i < 20; i++) begin
      feed($signed($urandom_range(0, 4095)) - 2048);
      repeat (LAT - 2) @(negedge clk);
      out_full = 1;
      repeat ($urandom_range(3, 30)) @(negedge clk);
      out_full = 0;
    end
    repeat (LAT + 5) @(negedge clk);
    // saturation: full-scale words with large coefficients
    load_coefs(1);
    for (int i = 0; i < 40; i++) begin
      feed((i < 20) ? 32767 : -32768);
      repeat (LAT + 2) @(negedge clk);
    end
    repeat (LAT + 5) @(negedge clk);
    check(exp_q.size() == 0, "results missing");
    check(outputs == 160, $sformatf("output count %0d", outputs));
    check(stalls > 0, "no stall seen");
    check(saturations > 0, "no saturation seen");
    $display("outputs=%0d stalls=%0d saturations=%0d", outputs, stalls, saturations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
