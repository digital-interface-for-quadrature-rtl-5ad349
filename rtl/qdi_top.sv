// qdi_top: digital interface for one view of a scanning interferometer.
//
// The interferometer fringe signal is digitised synchronously with an
// external clock at 4f/(2M+1), f being the instantaneous carrier frequency, so
// successive samples step the carrier phase by a quarter turn and the data
// stream carries cos(phi), sin(phi), -cos(phi), -sin(phi), ... whatever the
// carrier frequency. A fixed band-pass filter centred on a quarter of the
// sample rate therefore removes sideband noise from the whole frequency-agile
// scan.
//
// Data path: control unit A (ctrl_unit_a) turns REV_START and the external
// START_SAMPLE clock into a bounded number of sample requests per scan;
// control unit B (ctrl_unit_b) runs the A/D converter and writes each result
// into the input latch; the FIR engine (fir_filter) takes it, filters it and
// writes the output latch; control unit B sends each filtered word to link
// adaptor B as two bytes. Link adaptor A delivers the software settings to
// control unit A. The link adaptors, the converter, the sample-and-hold and
// the clock synthesiser are external parts: their parallel or digital sides
// are the ports of this module.
//
// Timing: one 20 MHz clock. A sample is in the input latch CONV_CYCLES + 2
// clocks after its request; its filtered value reaches the output latch
// NTAPS + OVERHEAD clocks after the filter takes it, 38 clocks (1.9 us) for
// 31 taps, so sample rates up to about 500 kHz are sustained.
//
// Status outputs pulse once per event: a request that found the converter
// busy (`sample_miss`), a sample lost because the filter had not yet read the
// previous one (`in_overrun`), and each clock in which the filter waits for a
// full output latch (`fir_stall`).
//
// The partition into two control units, latches and a filter, the latch and
// interrupt coupling, and the 31-tap, N+7-cycle filter follow the original
// system; the single clock and all handshakes are this design's own choices.
module qdi_top
  import qdi_pkg::*;
#(
  parameter int unsigned NTAPS       = 31,
  parameter int unsigned OVERHEAD    = 7,
  parameter int unsigned CONV_CYCLES = 15,
  localparam int unsigned AW         = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // external timing
  input  logic          start_sample,
  input  logic          rev_start,
  // link adaptor A, parallel output side
  input  logic [7:0]    la_data,
  input  logic          la_valid,
  output logic          la_ack,
  // A/D converter and sample-and-hold
  output logic          adc_hold,
  output logic          adc_encode,
  input  adc_t          adc_data,
  // link adaptor B, parallel input side
  output logic [7:0]    lb_data,
  output logic          lb_valid,
  input  logic          lb_ack,
  // filter coefficient load (boot)
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  coef_t         coef_data,
  // status
  output logic          scan_active,
  output logic          scan_done,
  output logic          scan_restart,
  output logic          sample_miss,
  output logic          in_overrun,
  output logic          fir_stall,
  output logic          fir_busy,
  // settings held by control unit A
  output cnt_t          cfg_num_samples,
  output cnt_t          cfg_start_delay,
  output logic          cfg_enable
);

  logic  sample_req;
  logic  il_wr, il_rd, il_full;
  adc_t  il_d, il_q;
  logic  ol_wr, ol_rd, ol_full, ol_overrun;
  data_t ol_d, ol_q;

  ctrl_unit_a u_ctrl_a (
    .clk, .rst_n,
    .start_sample, .rev_start,
    .la_data, .la_valid, .la_ack,
    .sample_req,
    .scan_active, .scan_done, .scan_restart,
    .num_samples(cfg_num_samples), .start_delay(cfg_start_delay), .enable(cfg_enable)
  );

  ctrl_unit_b #(.CONV_CYCLES(CONV_CYCLES)) u_ctrl_b (
    .clk, .rst_n,
    .sample_req,
    .adc_hold, .adc_encode, .adc_data,
    .il_wr, .il_d, .sample_miss,
    .ol_full, .ol_q, .ol_rd,
    .lb_data, .lb_valid, .lb_ack
  );

  data_latch #(.W(ADC_W)) u_in_latch (
    .clk, .rst_n,
    .wr(il_wr), .d(il_d), .rd(il_rd),
    .q(il_q), .full(il_full), .overrun(in_overrun)
  );

  fir_filter #(.NTAPS(NTAPS), .OVERHEAD(OVERHEAD)) u_fir (
    .clk, .rst_n,
    .coef_we, .coef_addr, .coef_data,
    .in_full(il_full), .in_data(data_t'(il_q)), .in_rd(il_rd),
    .out_full(ol_full), .out_wr(ol_wr), .out_data(ol_d),
    .busy(fir_busy), .stall(fir_stall)
  );

  data_latch #(.W(DATA_W)) u_out_latch (
    .clk, .rst_n,
    .wr(ol_wr), .d(ol_d), .rd(ol_rd),
    .q(ol_q), .full(ol_full), .overrun(ol_overrun)
  );

  // The filter only writes an empty output latch.
  a_no_out_overrun: assert property (@(posedge clk) disable iff (!rst_n) !ol_overrun);

endmodule
