// tb_sideband: frequency response of the whole interface with the 31-tap
// rectangular-windowed band-pass.
//
// For each test tone (frequency given as a fraction of the sample rate) one
// scan of 200 samples is taken through the top level: converter model, both
// control units, latches, filter and link B. The RMS of the filtered words
// after the filter has filled is compared with the RMS of the converter
// codes. The gain at the carrier (a quarter of the sample rate) must match
// |H| computed here from the quantised coefficients; every tone at least a
// tenth of the sample rate away from the carrier must be attenuated by at
// least 21 dB relative to the carrier, the minimum sideband attenuation
// expected of a rectangular-windowed filter.
module tb_sideband;
  import qdi_pkg::*;
  import qdi_tb_pkg::*;

  localparam int NTAPS = 31;
  localparam int AW    = $clog2(NTAPS);
  localparam int NS    = 200;

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
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int h [NTAPS];
  real in_sq = 0.0, out_sq = 0.0;
  int n_in = 0, n_out = 0;

  always @(posedge adc_encode) begin
    int c;
    c = adc_code(vin);
    if (n_in >= NTAPS) in_sq += real'(c) * real'(c);
    n_in++;
  end

  initial begin : link_b
    logic [7:0] lo;
    bit have_lo;
    have_lo = 0;
    forever begin
      @(negedge clk);
      if (lb_valid && !lb_ack) begin
        if (!have_lo) begin lo = lb_data; have_lo = 1; end
        else begin
          automatic int w = int'($signed({lb_data, lo}));
          have_lo = 0;
          if (n_out >= NTAPS) out_sq += real'(w) * real'(w);
          n_out++;
        end
        lb_ack = 1;
        do @(negedge clk); while (lb_valid);
        lb_ack = 0;
      end
    end
  end

  task automatic link_byte(logic [7:0] b);
    @(negedge clk);
    la_data = b; la_valid = 1;
    do @(posedge clk); while (!la_ack);
    @(negedge clk) la_valid = 0;
  endtask

  task automatic write_reg(logic [7:0] r, logic [15:0] v);
    link_byte(r); link_byte(v[7:0]); link_byte(v[15:8]);
  endtask

  // |H(nu)| of the quantised coefficients
  function automatic real mag_h(real nu);
    real pi, re, im;
    pi = 3.14159265358979;
    re = 0.0; im = 0.0;
    for (int n = 0; n < NTAPS; n++) begin
      re += real'(h[n]) / 32768.0 * $cos(2.0 * pi * nu * n);
      im -= real'(h[n]) / 32768.0 * $sin(2.0 * pi * nu * n);
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real db(real x);
    return 20.0 * $log10(x);
  endfunction

  // gain through the interface for one tone
  task automatic run_tone(real nu, output real gain);
    real pi;
    pi = 3.14159265358979;
    in_sq = 0.0; out_sq = 0.0; n_in = 0; n_out = 0;
    #300ns rev_start = 1;
    #200ns rev_start = 0;
    #300ns;
    for (int k = 0; k < NS; k++) begin
      vin = 0.9 * $cos(2.0 * pi * nu * k + 0.3);
      start_sample = 1;
      #5us start_sample = 0;
      #5us;
    end
    wait (!scan_active);
    repeat (200) @(negedge clk);
    check(n_out == NS, $sformatf("tone %f: %0d words", nu, n_out));
    gain = $sqrt(out_sq / in_sq);
  endtask

  real tones [6] = '{0.25, 0.0, 0.12, 0.37, 0.42, 0.5};
  real g, g0, pred0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NTAPS; n++) begin
      h[n] = band_pass_coef(n, NTAPS);
      @(negedge clk);
      coef_we = 1; coef_addr = AW'(n); coef_data = coef_t'(h[n]);
    end
    @(negedge clk) coef_we = 0;
    write_reg(REG_NUM_SAMPLES, 16'(NS));
    write_reg(REG_START_DELAY, 16'd0);
    write_reg(REG_CONTROL, 16'd1);
    g0 = 1.0;
    foreach (tones[i]) begin
      run_tone(tones[i], g);
      if (i == 0) begin
        g0 = g;
        pred0 = mag_h(0.25);
        check(g > 0.97 * pred0 && g < 1.03 * pred0,
              $sformatf("carrier gain %f, expected %f", g, pred0));
        $display("carrier: gain %f (expected %f)", g, pred0);
      end else begin
        $display("tone %4.2f fs: %6.1f dB relative to carrier (coefficients alone %6.1f dB)",
                 tones[i], db(g / g0), db(mag_h(tones[i]) / pred0));
        check(db(g / g0) <= -21.0, $sformatf("tone %f only %f dB down", tones[i], db(g / g0)));
      end
    end
    check(!sample_miss && !in_overrun, "samples lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
