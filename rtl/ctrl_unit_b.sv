// ctrl_unit_b: A/D conversion control and output transfer to link adaptor B.
//
// Conversion side: each `sample_req` from control unit A puts the
// sample-and-hold into hold (`adc_hold`), pulses the converter's start input
// (`adc_encode`) for one clock and then waits CONV_CYCLES clocks, the
// converter's maximum conversion time (750 ns at the 20 MHz logic clock).
// It then writes the 12-bit result, whose bus passes straight through as
// `il_d`, into the input latch (`il_wr`), which
// interrupts the filter, and releases the hold. A request that arrives while
// a conversion is under way cannot be served; it is dropped and `sample_miss`
// pulses.
//
// Output side: when the output latch holds a filtered word (`ol_full`), the
// word is taken (`ol_rd`) and sent to the parallel input of link adaptor B as
// two bytes, low byte first. Each byte uses a four-phase handshake: `lb_valid`
// is raised with the byte on `lb_data`, dropped once `lb_ack` is seen high,
// and the next byte waits for `lb_ack` to fall. While a word is being sent the
// output latch can fill again; if it stays full the filter waits.
//
// The split of duties (ADC sampling, and transfer of filtered data to link
// B) follows the original system; the handshakes, byte order, the conversion wait
// and the dropping of late requests are this design's own choices.
module ctrl_unit_b
  import qdi_pkg::*;
#(
  parameter int unsigned CONV_CYCLES = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  // from control unit A
  input  logic        sample_req,
  // A/D converter and sample-and-hold
  output logic        adc_hold,
  output logic        adc_encode,
  input  adc_t        adc_data,
  // input latch
  output logic        il_wr,
  output adc_t        il_d,
  output logic        sample_miss,
  // output latch
  input  logic        ol_full,
  input  data_t       ol_q,
  output logic        ol_rd,
  // link adaptor B, parallel input side
  output logic [7:0]  lb_data,
  output logic        lb_valid,
  input  logic        lb_ack
);

  localparam int unsigned TW = $clog2(CONV_CYCLES + 1);

  // ---------------- conversion ----------------
  logic          converting;
  logic [TW-1:0] tcnt;

  assign il_d = adc_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      converting  <= 1'b0;
      tcnt        <= '0;
      adc_hold    <= 1'b0;
      adc_encode  <= 1'b0;
      il_wr       <= 1'b0;
      sample_miss <= 1'b0;
    end else begin
      adc_encode  <= 1'b0;
      il_wr       <= 1'b0;
      sample_miss <= sample_req && converting;
      if (!converting) begin
        if (sample_req) begin
          converting <= 1'b1;
          adc_hold   <= 1'b1;
          adc_encode <= 1'b1;
          tcnt       <= TW'(CONV_CYCLES);
        end
      end else if (tcnt != '0) begin
        tcnt <= tcnt - 1'b1;
      end else begin
        il_wr      <= 1'b1;
        adc_hold   <= 1'b0;
        converting <= 1'b0;
      end
    end
  end

  // ---------------- output transfer ----------------
  typedef enum logic [2:0] {O_IDLE, O_LO, O_LO_REL, O_HI, O_HI_REL} ostate_e;
  ostate_e ostate;
  logic [7:0] hi_byte;

  assign ol_rd = (ostate == O_IDLE) && ol_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ostate   <= O_IDLE;
      hi_byte  <= '0;
      lb_data  <= '0;
      lb_valid <= 1'b0;
    end else begin
      unique case (ostate)
        O_IDLE: if (ol_full) begin
          hi_byte  <= ol_q[15:8];
          lb_data  <= ol_q[7:0];
          lb_valid <= 1'b1;
          ostate   <= O_LO;
        end
        O_LO: if (lb_ack) begin
          lb_valid <= 1'b0;
          ostate   <= O_LO_REL;
        end
        O_LO_REL: if (!lb_ack) begin
          lb_data  <= hi_byte;
          lb_valid <= 1'b1;
          ostate   <= O_HI;
        end
        O_HI: if (lb_ack) begin
          lb_valid <= 1'b0;
          ostate   <= O_HI_REL;
        end
        O_HI_REL: if (!lb_ack) ostate <= O_IDLE;
        default: ostate <= O_IDLE;
      endcase
    end
  end

endmodule
