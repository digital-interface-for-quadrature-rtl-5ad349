// tb_qdi_top: end-to-end test of one view of the interface, at the default
// parameters (31 taps, 7 cycles overhead, 750 ns conversion, 20 MHz clock).
//
// Scan 1 is a complete grating scan: twelve fringe bursts, each sampled in
// quadrature at 4f with its own carrier, so the sample clock steps from
// 80 kHz to 300 kHz across the scan. The fringe signal is a phase-modulated
// carrier with a parasitic sideband. Every filtered word that arrives on link
// B is compared bit-exactly with a reference filter run here on the codes
// the converter was given. Link B is held off once in the scan so that the
// filter has to wait for its output latch; no sample may be lost.
// Scan 2 drives the sample clock too fast on purpose (conversion misses and
// input latch overruns) and restarts the scan in the middle with REV_START.
// Scan 3 is a clean scan again, checked after the filter has refilled.
// Each mechanism (start delay, sample count limit, restart, stall, miss,
// overrun, link A programming) must occur at least once.
module tb_qdi_top;
  import qdi_pkg::*;
  import qdi_tb_pkg::*;

  localparam int NTAPS = 31;
  localparam int AW    = $clog2(NTAPS);

  logic clk = 0, rst_n = 0;
  logic start_sample = 0, rev_start = 0;
  logic [7:0] la_data = '0;
  logic la_valid = 0, la_ack;
  logic adc_hold, adc_encode;
  adc_t adc_data;
  logic [7:0] lb_data;
  logic lb_valid, lb_ack = 0;
  logic coef_we = 0;
  logic [AW-1:0] coef_addr = '0;
  coef_t coef_data = '0;
  logic scan_active, scan_done, scan_restart, sample_miss, in_overrun, fir_stall, fir_busy;
  cnt_t cfg_num_samples, cfg_start_delay;
  logic cfg_enable;

  real vin = 0.0;
  logic adc_busy;

  qdi_top dut (.*);
  ad671_model #(.T_CONV_NS(700.0)) u_adc (
    .encode(adc_encode), .vin(vin), .data(adc_data), .busy(adc_busy));

  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_miss = 0, n_ovr = 0, n_stall = 0, n_restart = 0, n_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (sample_miss)  n_miss++;
    if (in_overrun)   n_ovr++;
    if (fir_stall)    n_stall++;
    if (scan_restart) n_restart++;
    if (scan_done)    n_done++;
  end

  // ---------------- reference ----------------
  int h [NTAPS];
  int codes [$];          // codes converted in the current checked stretch
  int n_words = 0;        // words received in the current stretch
  int skip = 0;           // words not compared at the start of a stretch
  bit checking = 0;
  int n_compared = 0;

  always @(posedge adc_encode) codes.push_back(adc_code(vin));

  // ---------------- link B receiver ----------------
  bit hold_link = 0;
  initial begin : link_b
    logic [7:0] lo;
    bit have_lo;
    have_lo = 0;
    forever begin
      @(negedge clk);
      if (lb_valid && !lb_ack && !hold_link) begin
        if (!have_lo) begin
          lo = lb_data; have_lo = 1;
        end else begin
          have_lo = 0;
          if (checking && n_words >= skip) begin
            automatic longint acc = 0;
            int e;
            for (int k = 0; k < NTAPS; k++)
              if (n_words - k >= 0) acc += longint'(codes[n_words - k]) * longint'(h[k]);
            e = round_sat(acc);
            check($signed({lb_data, lo}) == 16'(e),
                  $sformatf("word %0d: got %0d exp %0d", n_words, $signed({lb_data, lo}), e));
            n_compared++;
          end
          n_words++;
        end
        lb_ack = 1;
        do @(negedge clk); while (lb_valid);
        lb_ack = 0;
      end
    end
  end

  // ---------------- link A and sample clock ----------------
  task automatic link_byte(logic [7:0] b);
    @(negedge clk);
    la_data = b; la_valid = 1;
    do @(posedge clk); while (!la_ack);
    @(negedge clk) la_valid = 0;
  endtask

  task automatic write_reg(logic [7:0] r, logic [15:0] v);
    link_byte(r); link_byte(v[7:0]); link_byte(v[15:8]);
  endtask

  // One START_SAMPLE pulse; the fringe value for it is put on the converter
  // input at the rising edge and stays until the next pulse.
  int k_smp = 0;
  real phi = 0.0;
  task automatic sample_pulse(real period_ns);
    real pi, v;
    pi = 3.14159265358979;
    phi = phi + 0.02;                       // slow plasma phase drift
    v = 0.8 * $cos(pi / 2.0 * k_smp + phi)  // carrier, quadrature sampled
      + 0.1 * $cos(2.0 * pi * 0.37 * k_smp); // parasitic sideband
    k_smp++;
    vin = v;
    start_sample = 1;
    #(period_ns / 2.0 * 1ns);
    start_sample = 0;
    #(period_ns / 2.0 * 1ns);
  endtask

  task automatic pulse_rev;
    #300ns rev_start = 1;
    #200ns rev_start = 0;
    #300ns;
  endtask

  task automatic drain;
    wait (!scan_active);
    repeat (400) @(negedge clk);
  endtask

  int words_before;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // boot: load the band-pass coefficients
    for (int n = 0; n < NTAPS; n++) begin
      h[n] = band_pass_coef(n, NTAPS);
      @(negedge clk);
      coef_we = 1; coef_addr = AW'(n); coef_data = coef_t'(h[n]);
    end
    @(negedge clk) coef_we = 0;
    // software settings through link A
    write_reg(REG_NUM_SAMPLES, 16'd120);
    write_reg(REG_START_DELAY, 16'd4);
    write_reg(REG_CONTROL, 16'd1);
    check(cfg_num_samples == 120 && cfg_start_delay == 4 && cfg_enable, "settings");

    // ---- scan 1: twelve bursts, 80 to 300 kHz sampling, fully checked ----
    codes.delete(); n_words = 0; skip = 0; checking = 1;
    pulse_rev();
    // the delay pulses: their samples must not be converted
    for (int i = 0; i < 4; i++) sample_pulse(12500.0);
    for (int b = 0; b < 12; b++) begin
      real fs_khz;
      fs_khz = 80.0 + 20.0 * b;
      for (int i = 0; i < 10; i++) begin
        if (b == 6 && i == 2) hold_link = 1;
        if (b == 6 && i == 6) hold_link = 0;
        sample_pulse(1.0e6 / fs_khz);
      end
    end
    // pulses after the end of the scan are ignored
    for (int i = 0; i < 10; i++) sample_pulse(3333.0);
    drain();
    check(codes.size() == 120, $sformatf("scan 1 conversions %0d", codes.size()));
    check(n_words == 120, $sformatf("scan 1 words %0d", n_words));
    check(n_miss == 0 && n_ovr == 0, "scan 1 lost samples");
    check(n_stall > 0, "no filter stall in scan 1");
    check(n_done == 1, "scan 1 done");

    // ---- scan 2: too fast, with a restart ----
    checking = 0;
    codes.delete(); n_words = 0;
    write_reg(REG_START_DELAY, 16'd0);
    pulse_rev();
    for (int i = 0; i < 30; i++) sample_pulse(1000.0);   // 1 MHz: overruns
    pulse_rev();                                        // restart in mid scan
    for (int i = 0; i < 30; i++) sample_pulse(500.0);   // 2 MHz: misses
    for (int i = 0; i < 100; i++) sample_pulse(3333.0);
    drain();
    check(n_restart == 1, $sformatf("restarts %0d", n_restart));
    check(n_words == codes.size() - n_ovr, $sformatf("scan 2 words %0d codes %0d overruns %0d",
          n_words, codes.size(), n_ovr));
    check(n_done == 2, "scan 2 done");

    // ---- scan 3: clean again, compared once the filter has refilled ----
    codes.delete(); n_words = 0; skip = NTAPS - 1; checking = 1;
    write_reg(REG_NUM_SAMPLES, 16'd60);
    pulse_rev();
    for (int i = 0; i < 70; i++) sample_pulse(4000.0);
    drain();
    check(n_words == 60, $sformatf("scan 3 words %0d", n_words));
    check(n_compared == 120 + 60 - (NTAPS - 1), $sformatf("compared %0d", n_compared));
    check(n_done == 3, "scan 3 done");

    // every mechanism happened
    check(n_miss > 0, "no conversion miss");
    check(n_ovr > 0, "no input latch overrun");
    $display("mechanisms: start_delay=1 scans=%0d restart=%0d stall_clocks=%0d misses=%0d overruns=%0d compared=%0d",
             n_done, n_restart, n_stall, n_miss, n_ovr, n_compared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
