// diff_input_buffer: behavioural model (not synthesizable as written; in the
// FPGA it is a bank of LVDS input buffers) of the differential receivers that
// take the 12 ADC data lines into the FPGA. Each output bit is 1 when its
// positive line is above the negative one and 0 when below; when both lines
// are equal (an undriven or shorted pair) the bit keeps its last value, as a
// receiver with hysteresis would; this hold is why lint reports a latch, and
// it is intended. There is no clock and no delay.
// The block and its 12-bit output are named in the document; the receiver
// behaviour is the usual one for LVDS and is this model's reading.
`timescale 1ps/1ps
module diff_input_buffer #(
  parameter int unsigned WIDTH = bxb_pkg::ADC_BITS
) (
  input  logic [WIDTH-1:0] in_p,
  input  logic [WIDTH-1:0] in_n,
  output logic [WIDTH-1:0] out
);
  initial out = '0;
  for (genvar i = 0; i < WIDTH; i++) begin : g_rx
    always @(in_p[i] or in_n[i]) begin
      if (in_p[i] != in_n[i]) out[i] = in_p[i];
    end
  end
endmodule
