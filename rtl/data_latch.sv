// data_latch: one-word holding latch with a full flag, as placed between the
// A/D converter and the signal processor's input and between its output and
// link adaptor B.
//
// The writer strobes `wr`; the word is held and `full` rises on the next
// clock. `full` is the interrupt request to the reader, which takes `q` and
// strobes `rd` to free the latch. A write while the latch is still full is an
// overrun: the held word is kept, the new one is lost, and `overrun` pulses
// for one clock so that it can be counted. A read and a write in the same
// clock on a full latch replace the word (no overrun). Reset empties it.
// Latches with an interrupt between converter, processor and link follow the
// original system; the overrun rule is this design's own.
module data_latch #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr,
  input  logic [W-1:0] d,
  input  logic         rd,
  output logic [W-1:0] q,
  output logic         full,
  output logic         overrun
);
  logic take;
  assign take = wr && (!full || rd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      full    <= 1'b0;
      overrun <= 1'b0;
    end else begin
      overrun <= wr && full && !rd;
      if (take)    q <= d;
      if (take)    full <= 1'b1;
      else if (rd) full <= 1'b0;
    end
  end

  // The reader only takes a word that is there.
  a_rd_when_full: assert property (@(posedge clk) disable iff (!rst_n) rd |-> full);
endmodule
