// tb_phase: phase recovery from the filtered stream of a scan of four
// fringe bursts.
//
// Each burst carries its own plasma phase (a step between bursts, as the
// beam moves to a new chord) with a slow drift, a parasitic sideband at
// 0.37 fs and a little noise, sampled in quadrature at M = 0 with a
// different sample rate per burst. The host's phase extraction is done here:
// consecutive samples give (I, Q) with a sign pattern that repeats every four
// samples, and the phase is atan2(Q, I). For the filtered stream the pattern
// and the reference phase are taken 15 samples earlier, the filter's delay.
// Checks: away from the burst edges the filtered phase error is less than
// half that of the raw samples and below 0.05 rad; around each phase step the
// filtered phase is more than 0.1 rad off for no more than NTAPS + 1 samples,
// the span of the filter.
module tb_phase;
  import qdi_pkg::*;
  import qdi_tb_pkg::*;

  localparam int NTAPS = 31;
  localparam int AW    = $clog2(NTAPS);
  localparam int NB    = 4;
  localparam int BL    = 100;             // samples per burst
  localparam int NS    = NB * BL;
  localparam int DLY   = (NTAPS - 1) / 2; // filter delay in samples

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

  localparam real PI = 3.14159265358979;

  int  raw [$];
  int  filt [$];
  real truth [NS];

  always @(posedge adc_encode) raw.push_back(adc_code(vin));

  initial begin : link_b
    logic [7:0] lo;
    bit have_lo;
    have_lo = 0;
    forever begin
      @(negedge clk);
      if (lb_valid && !lb_ack) begin
        if (!have_lo) begin lo = lb_data; have_lo = 1; end
        else begin
          have_lo = 0;
          filt.push_back(int'($signed({lb_data, lo})));
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

  function automatic real wrap(real a);
    while (a > PI)   a -= 2.0 * PI;
    while (a <= -PI) a += 2.0 * PI;
    return a;
  endfunction

  // Phase from samples s[n], s[n+1] whose carrier index is n - shift.
  function automatic real phase_at(int s [$], int n, int shift);
    real a, b, i_c, q_c;
    a = real'(s[n]);
    b = real'(s[n + 1]);
    unique case (((n - shift) % 4 + 4) % 4)
      0: begin i_c =  a; q_c = -b; end
      1: begin i_c = -b; q_c = -a; end
      2: begin i_c = -a; q_c =  b; end
      default: begin i_c =  b; q_c =  a; end
    endcase
    return $atan2(q_c, i_c);
  endfunction

  real step_phase [NB] = '{0.3, 2.0, -1.2, 0.8};

  initial begin
    real err_raw, err_filt, e;
    int n_raw, n_filt, settle, worst_settle;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NTAPS; n++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = AW'(n); coef_data = coef_t'(band_pass_coef(n, NTAPS));
    end
    @(negedge clk) coef_we = 0;
    write_reg(REG_NUM_SAMPLES, 16'(NS));
    write_reg(REG_START_DELAY, 16'd0);
    write_reg(REG_CONTROL, 16'd1);
    #300ns rev_start = 1;
    #200ns rev_start = 0;
    #300ns;
    for (int k = 0; k < NS; k++) begin
      real per_ns;
      int b;
      b = k / BL;
      per_ns = 1.0e6 / (100.0 + 60.0 * b);   // 100 to 280 kHz sampling
      truth[k] = wrap(step_phase[b] + 0.004 * (k % BL));
      vin = 0.75 * $cos(PI / 2.0 * k + truth[k])
          + 0.2 * $cos(2.0 * PI * 0.37 * k)
          + 0.01 * (real'($urandom_range(0, 200)) - 100.0) / 100.0;
      start_sample = 1;
      #(per_ns / 2.0 * 1ns) start_sample = 0;
      #(per_ns / 2.0 * 1ns);
    end
    wait (!scan_active);
    repeat (200) @(negedge clk);
    check(raw.size() == NS && filt.size() == NS,
          $sformatf("%0d codes, %0d words", raw.size(), filt.size()));

    // steady-state error inside each burst
    err_raw = 0.0; err_filt = 0.0; n_raw = 0; n_filt = 0;
    for (int b = 0; b < NB; b++)
      for (int k = b * BL + DLY + 1; k < (b + 1) * BL - DLY - 1; k++) begin
        e = wrap(phase_at(raw, k, 0) - truth[k]);
        err_raw += e * e; n_raw++;
        e = wrap(phase_at(filt, k + DLY, DLY) - truth[k]);
        err_filt += e * e; n_filt++;
      end
    err_raw  = $sqrt(err_raw / n_raw);
    err_filt = $sqrt(err_filt / n_filt);
    $display("rms phase error: raw %f rad, filtered %f rad", err_raw, err_filt);
    check(err_filt < 0.5 * err_raw, "filtering does not improve the phase");
    check(err_filt < 0.05, "filtered phase error above 0.05 rad");

    // width of the phase transition around each step: the span of samples
    // whose filtered phase is more than 0.1 rad off
    worst_settle = 0;
    for (int b = 1; b < NB; b++) begin
      int first_bad, last_bad;
      first_bad = -1; last_bad = -1;
      for (int k = b * BL - BL / 2; k < b * BL + BL / 2; k++) begin
        e = wrap(phase_at(filt, k + DLY, DLY) - truth[k]);
        if (e > 0.1 || e < -0.1) begin
          if (first_bad < 0) first_bad = k;
          last_bad = k;
        end
      end
      settle = (first_bad < 0) ? 0 : last_bad - first_bad + 1;
      if (settle > worst_settle) worst_settle = settle;
      check(settle <= NTAPS + 1, $sformatf("step %0d: transition over %0d samples", b, settle));
      check(first_bad >= b * BL - DLY - 1, $sformatf("step %0d seen too early, at %0d", b, first_bad));
    end
    $display("widest phase transition at a step: %0d samples", worst_settle);
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
