// ctrl_unit_a: scan timing control. Decides which pulses of the external
// quadrature sample clock become A/D conversions during one revolution of the
// scanning grating.
//
// How it works: the start-of-scan pulse REV_START presets two down-counters
// from software registers, START_DELAY and NUM_SAMPLES. The following
// START_SAMPLE pulses (the external 4f/(2M+1) clock) first count down the
// delay, then each one issues a one-clock `sample_req` to control unit B and
// counts down the sample counter. When it reaches zero the scan is over:
// `scan_done` pulses and further clock pulses are ignored until the next
// REV_START. A REV_START during a scan restarts the count (`scan_restart`
// pulses). Nothing happens while the CONTROL register's enable bit is clear.
//
// Programming: software writes the registers through link adaptor A, whose
// parallel side delivers bytes with a valid level (`la_valid`). Each byte is
// taken and acknowledged with a one-clock `la_ack`; the next byte is taken
// after `la_valid` has dropped. Three bytes make one write: register number
// (qdi_pkg::ctrl_reg_e), low byte, high byte. Unknown register numbers are
// ignored. New values apply from the next REV_START.
//
// Timing: both external inputs are resynchronised, so `sample_req` follows a
// START_SAMPLE edge by two to three clocks. A sample clock of up to a few MHz
// can be followed with the 20 MHz logic clock.
//
// The use of REV_START and START_SAMPLE to bound the samples per scan, and
// software control of the timing parameters, follow the original system. The register
// set, the start delay, the byte framing and the restart rule are this
// design's own choices.
module ctrl_unit_a
  import qdi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // external timing inputs (asynchronous)
  input  logic       start_sample,
  input  logic       rev_start,
  // link adaptor A, parallel output side
  input  logic [7:0] la_data,
  input  logic       la_valid,
  output logic       la_ack,
  // to control unit B
  output logic       sample_req,
  // status
  output logic       scan_active,
  output logic       scan_done,
  output logic       scan_restart,
  output cnt_t       num_samples,
  output cnt_t       start_delay,
  output logic       enable
);

  typedef enum logic [1:0] {A_IDLE, A_DELAY, A_ACQ} state_e;

  logic   ss_rise, rs_rise;
  state_e state;
  cnt_t   delay_cnt, samp_cnt;

  sync_edge u_sync_ss (.clk, .rst_n, .async_in(start_sample), .rise(ss_rise));
  sync_edge u_sync_rs (.clk, .rst_n, .async_in(rev_start),    .rise(rs_rise));

  // ---------------- register load from link A ----------------
  logic [1:0] byte_idx;
  logic       wait_low;
  logic [7:0] reg_sel, lo_byte;

  assign la_ack = la_valid && !wait_low;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byte_idx    <= '0;
      wait_low    <= 1'b0;
      reg_sel     <= '0;
      lo_byte     <= '0;
      num_samples <= '0;
      start_delay <= '0;
      enable      <= 1'b0;
    end else begin
      if (wait_low && !la_valid) wait_low <= 1'b0;
      if (la_ack) begin
        wait_low <= 1'b1;
        unique case (byte_idx)
          2'd0: begin reg_sel <= la_data; byte_idx <= 2'd1; end
          2'd1: begin lo_byte <= la_data; byte_idx <= 2'd2; end
          default: begin
            byte_idx <= 2'd0;
            case (reg_sel)
              REG_NUM_SAMPLES: num_samples <= {la_data, lo_byte};
              REG_START_DELAY: start_delay <= {la_data, lo_byte};
              REG_CONTROL:     enable      <= lo_byte[0];
              default: ;
            endcase
          end
        endcase
      end
    end
  end

  // ---------------- scan sequencing ----------------
  assign scan_active = (state != A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= A_IDLE;
      delay_cnt    <= '0;
      samp_cnt     <= '0;
      sample_req   <= 1'b0;
      scan_done    <= 1'b0;
      scan_restart <= 1'b0;
    end else begin
      sample_req   <= 1'b0;
      scan_done    <= 1'b0;
      scan_restart <= 1'b0;
      if (!enable) begin
        state <= A_IDLE;
      end else if (rs_rise) begin
        scan_restart <= (state != A_IDLE);
        delay_cnt    <= start_delay;
        samp_cnt     <= num_samples;
        if (num_samples == '0)      state <= A_IDLE;
        else if (start_delay == '0) state <= A_ACQ;
        else                        state <= A_DELAY;
      end else if (ss_rise) begin
        unique case (state)
          A_DELAY: begin
            delay_cnt <= delay_cnt - 1'b1;
            if (delay_cnt == cnt_t'(1)) state <= A_ACQ;
          end
          A_ACQ: begin
            sample_req <= 1'b1;
            samp_cnt   <= samp_cnt - 1'b1;
            if (samp_cnt == cnt_t'(1)) begin
              state     <= A_IDLE;
              scan_done <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
