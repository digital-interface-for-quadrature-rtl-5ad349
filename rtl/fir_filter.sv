// fir_filter: transversal FIR band-pass filter for the quadrature-sampled
// fringe stream, one multiply-accumulate per clock.
//
// How it works: each input word is written into a circular delay line of
// NTAPS words. The engine then walks the delay line backwards from the newest
// word while walking the coefficient memory forwards, reading one pair per
// clock into registers and adding their product to a 40-bit accumulator on
// the next clock, so y[n] = sum_k h[k] * x[n-k] for k = 0..NTAPS-1. The sum is
// rounded from Q.15 back to a data word and saturated to 16 bits.
//
// Timing: the input word is taken in the clock in which `in_rd` pulses; the
// result is offered on `out_wr` exactly NTAPS + OVERHEAD clocks later, the
// N + 7 cycles quoted for a transversal filter on a single-cycle MAC signal
// processor. If the output latch is still full (`out_full`) the engine waits
// with the result, which is the only stall. It takes no new input while busy;
// new samples wait in the input latch. A waiting sample is taken in the clock
// that hands over the previous result, so a continuous stream runs at one
// output per NTAPS + OVERHEAD clocks. After reset the delay line is cleared,
// which takes NTAPS clocks before the first input is taken.
//
// Interface: `in_full`/`in_data`/`in_rd` read the input latch, `out_full`/
// `out_wr`/`out_data` write the output latch. Coefficients are written through
// `coef_we`/`coef_addr`/`coef_data`, Q1.15, h[0] at address 0; this is the
// load that the boot program performs, and may happen at any time.
//
// The filter length (31) and the cycle budget follow the original system. The word
// widths, rounding, saturation and the latch handshake are this design's own
// choices modelled on a 16-bit fixed-point DSP.
module fir_filter
  import qdi_pkg::*;
#(
  parameter int unsigned NTAPS    = 31,
  parameter int unsigned OVERHEAD = 7,
  localparam int unsigned AW      = (NTAPS > 1) ? $clog2(NTAPS) : 1,
  localparam int unsigned CW      = $clog2(NTAPS + OVERHEAD + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // coefficient load
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  coef_t         coef_data,
  // input latch
  input  logic          in_full,
  input  data_t         in_data,
  output logic          in_rd,
  // output latch
  input  logic          out_full,
  output logic          out_wr,
  output data_t         out_data,
  // status
  output logic          busy,
  output logic          stall
);

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_RUN, S_OUT} state_e;

  state_e       state;
  logic [CW-1:0] cyc;          // clocks since the input was taken
  logic [AW-1:0] wp;           // next delay-line write slot
  logic [AW-1:0] rp;           // delay-line read pointer
  logic [AW-1:0] kp;           // coefficient read pointer
  logic          fetch_v;      // x_r/c_r hold a pair to accumulate
  data_t         x_r;
  coef_t         c_r;
  acc_t          acc;
  data_t         result;

  data_t dline [NTAPS];
  coef_t coef  [NTAPS];

  function automatic logic [AW-1:0] dec_mod(logic [AW-1:0] a);
    return (a == '0) ? AW'(NTAPS - 1) : a - 1'b1;
  endfunction

  function automatic logic [AW-1:0] inc_mod(logic [AW-1:0] a);
    return (a == AW'(NTAPS - 1)) ? '0 : a + 1'b1;
  endfunction

  // Round Q.15 to nearest and saturate to a data word.
  function automatic data_t round_sat(acc_t a);
    acc_t r;
    r = (a + (acc_t'(1) <<< (FRAC_W - 1))) >>> FRAC_W;
    if (r > acc_t'(32767))       return data_t'(16'sh7FFF);
    else if (r < acc_t'(-32768)) return data_t'(16'sh8000);
    else                         return data_t'(r);
  endfunction

  localparam int unsigned LAST = NTAPS + OVERHEAD;

  always_ff @(posedge clk) begin
    if (coef_we) coef[coef_addr] <= coef_data;
  end

  // Delay line write: zeros while clearing, the new sample when taken.
  always_ff @(posedge clk) begin
    if (state == S_CLEAR)     dline[wp] <= '0;
    else if (in_rd)           dline[wp] <= in_data;
  end

  // Operand fetch, one pair per clock.
  always_ff @(posedge clk) begin
    x_r <= dline[rp];
    c_r <= coef[kp];
  end

  // A new input is taken when idle, or in the clock that hands over the
  // previous result, so back-to-back samples are NTAPS + OVERHEAD clocks apart.
  assign in_rd    = in_full && ((state == S_IDLE) || out_wr);
  assign out_wr   = (state == S_OUT) && !out_full;
  assign out_data = result;
  assign busy     = (state != S_IDLE);
  assign stall    = (state == S_OUT) && out_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_CLEAR;
      cyc     <= '0;
      wp      <= '0;
      rp      <= '0;
      kp      <= '0;
      fetch_v <= 1'b0;
      acc     <= '0;
      result  <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          wp <= inc_mod(wp);
          if (wp == AW'(NTAPS - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (in_rd) begin
            rp      <= wp;
            wp      <= inc_mod(wp);
            kp      <= '0;
            cyc     <= CW'(1);
            acc     <= '0;
            fetch_v <= 1'b0;
            state   <= S_RUN;
          end
        end
        S_RUN: begin
          cyc <= cyc + 1'b1;
          // clocks 1..NTAPS fetch tap cyc-1, clocks 2..NTAPS+1 accumulate
          fetch_v <= (cyc <= CW'(NTAPS));
          if (cyc <= CW'(NTAPS)) begin
            rp <= dec_mod(rp);
            kp <= inc_mod(kp);
          end
          if (fetch_v) acc <= acc + acc_t'(x_r) * acc_t'(c_r);
          if (cyc == CW'(NTAPS + 2)) result <= round_sat(acc);
          if (cyc == CW'(LAST - 1)) state <= S_OUT;
        end
        S_OUT: begin
          if (in_rd) begin
            rp      <= wp;
            wp      <= inc_mod(wp);
            kp      <= '0;
            cyc     <= CW'(1);
            acc     <= '0;
            fetch_v <= 1'b0;
            state   <= S_RUN;
          end else if (!out_full) begin
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The cycle budget must leave room for fetch, accumulate and rounding.
  if (OVERHEAD < 4) begin : g_bad_overhead
    $error("fir_filter: OVERHEAD must be at least 4");
  end

endmodule
