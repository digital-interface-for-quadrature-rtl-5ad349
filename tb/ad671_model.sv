// ad671_model: behavioural model of a 12-bit A/D converter with a
// conversion time of T_CONV_NS nanoseconds, for simulation only.
//
// On each rising edge of `encode` the analogue input `vin` (a real value,
// full scale +/-1.0) is held and, T_CONV_NS later, the two's complement code
// round(vin * 2047), clipped to 12 bits, appears on `data`. `busy` is high
// during the conversion. Not synthesizable: it uses real numbers and delays.
module ad671_model #(
  parameter real T_CONV_NS = 700.0
) (
  input  logic        encode,
  input  real         vin,
  output logic [11:0] data,
  output logic        busy
);
  initial begin
    data = '0;
    busy = 1'b0;
  end

  always @(posedge encode) begin
    real held;
    int  code;
    held = vin;
    busy = 1'b1;
    code = $rtoi(held * 2047.0 + ((held >= 0.0) ? 0.5 : -0.5));
    if (code > 2047)  code = 2047;
    if (code < -2048) code = -2048;
    #(T_CONV_NS * 1ns);
    data = 12'(code);
    busy = 1'b0;
  end
endmodule
