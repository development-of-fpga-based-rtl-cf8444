// sync_bit: two-flop synchronizer bringing a level signal into the clock
// domain of clk. Output follows the input two clk edges later; reset clears
// both flops. Helper used at every clock-domain crossing of the monitor.
`timescale 1ps/1ps
module sync_bit #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
