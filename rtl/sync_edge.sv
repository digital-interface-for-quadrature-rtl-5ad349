// sync_edge: brings an asynchronous pulse input into the clock domain and
// marks its rising edge.
//
// Two flip-flops resynchronise the input; a third holds the previous value so
// that `rise` is high for exactly one clock after each rising edge. Latency
// from the input edge to `rise` is two to three clocks. Used for the external
// sample clock (START_SAMPLE) and the start-of-scan pulse (REV_START), which
// arrive unrelated to the 20 MHz logic clock.
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic rise
);
  logic [2:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[1:0], async_in};
  end

  assign rise = sh[1] & ~sh[2];
endmodule
