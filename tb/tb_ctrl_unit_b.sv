// tb_ctrl_unit_b: self-checking test of control unit B.
//
// Conversion side: sample requests are issued with random spacing, some of
// them while a conversion is still running. The converter model is fed a
// known input for each conversion; the test checks that every served request
// writes the right 12-bit code into the input latch exactly CONV_CYCLES + 2
// clocks after the request, that the hold line covers the conversion, and
// that every request made during a conversion is reported as missed.
// Output side: the test plays the output latch and link adaptor B, answering
// each byte after a random delay, and checks that every word arrives whole,
// low byte first, in order.
module tb_ctrl_unit_b;
  import qdi_pkg::*;

  localparam int CONV = 15;

  logic clk = 0, rst_n = 0;
  logic sample_req = 0;
  logic adc_hold, adc_encode;
  adc_t adc_data;
  logic il_wr;
  adc_t il_d;
  logic sample_miss;
  logic ol_full = 0;
  data_t ol_q = '0;
  logic ol_rd;
  logic [7:0] lb_data;
  logic lb_valid;
  logic lb_ack = 0;

  real vin = 0.0;
  logic adc_busy;

  ctrl_unit_b dut (.*);
  ad671_model #(.T_CONV_NS(700.0)) u_adc (
    .encode(adc_encode), .vin(vin), .data(adc_data), .busy(adc_busy));

  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- conversion side ----------------
  int exp_code [$];
  longint req_t [$];
  int served = 0, missed = 0, miss_exp = 0;
  bit busy_m = 0;

  always @(posedge clk) if (rst_n) begin
    if (il_wr) begin
      longint t;
      int e;
      served++;
      t = req_t.pop_front();
      e = exp_code.pop_front();
      check(cyc - t == longint'(CONV + 2), $sformatf("conversion time %0d", cyc - t));
      check(int'(il_d) == e, $sformatf("code %0d exp %0d", il_d, e));
      check(!adc_busy, "converter still busy at latch");
      busy_m = 0;
    end else if (busy_m) begin
      check(adc_hold, "hold released during conversion");
    end
    if (sample_miss) missed++;
    if (sample_req) begin
      if (busy_m) miss_exp++;
      else begin
        busy_m = 1;
        req_t.push_back(cyc);
      end
    end
  end

  // The converter holds `vin` on the rising edge of encode; the expected code
  // is taken from the same value, and a new input is set on the falling edge.
  always @(posedge adc_encode) begin
    int c;
    c = $rtoi(vin * 2047.0 + ((vin >= 0.0) ? 0.5 : -0.5));
    if (c > 2047) c = 2047;
    if (c < -2048) c = -2048;
    exp_code.push_back(c);
  end

  always @(negedge adc_encode)
    vin = (real'($urandom_range(0, 4000)) - 2000.0) / 1900.0;

  // ---------------- output side ----------------
  int words_sent [$];
  int words_got = 0;
  logic [7:0] lo_b;
  bit have_lo = 0;

  initial begin : latch_side
    @(posedge rst_n);
    for (int i = 0; i < 60; i++) begin
      int w;
      repeat ($urandom_range(0, 20)) @(negedge clk);
      w = int'($urandom_range(0, 65535));
      ol_q = data_t'(w);
      ol_full = 1;
      words_sent.push_back(w);
      do @(posedge clk); while (!ol_rd);
      @(negedge clk) ol_full = 0;
    end
  end

  initial begin : link_side
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (lb_valid && !lb_ack) begin
        repeat ($urandom_range(0, 6)) @(negedge clk);
        if (!have_lo) begin lo_b = lb_data; have_lo = 1; end
        else begin
          int e;
          e = words_sent.pop_front();
          check({lb_data, lo_b} == 16'(e), $sformatf("word %h exp %h", {lb_data, lo_b}, e));
          words_got++;
          have_lo = 0;
        end
        lb_ack = 1;
        do @(negedge clk); while (lb_valid);
        repeat ($urandom_range(0, 4)) @(negedge clk);
        lb_ack = 0;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      repeat ($urandom_range(2, 30)) @(negedge clk);
      sample_req = 1;
      @(negedge clk) sample_req = 0;
    end
    repeat (200) @(negedge clk);
    check(missed == miss_exp, $sformatf("missed %0d exp %0d", missed, miss_exp));
    check(miss_exp > 0, "no request during a conversion");
    check(served + missed == 200, "requests unaccounted for");
    check(words_got == 60, $sformatf("words received %0d", words_got));
    $display("served=%0d missed=%0d words=%0d", served, missed, words_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
