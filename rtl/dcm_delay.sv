// dcm_delay: behavioural model (not synthesizable) of the FPGA clock manager
// (DCM) used as a variable delay line for the ADC sample clock. The output
// clk_out is clk_in delayed by tap * TAP_PS picoseconds; tap runs 0..MAX_TAP
// (1023 steps of 10 ps as the document gives). The tap is moved one step per
// PSEN pulse on the PSCLK side, in the direction given by PSINCDEC, and PSDONE
// pulses for one PSCLK cycle PS_LATENCY cycles later, when the new delay is in
// force; steps beyond the ends are ignored but still answered with PSDONE.
// The port names follow the Virtex-4 DCM; the latency is this model's choice.
// Reset puts the tap back to 0.
`timescale 1ps/1ps
module dcm_delay #(
  parameter int unsigned TAP_BITS   = bxb_pkg::TAP_BITS,
  parameter int unsigned TAP_PS     = bxb_pkg::TAP_PS,
  parameter int unsigned PS_LATENCY = 4
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out,
  input  logic psclk,
  input  logic psen,
  input  logic psincdec,
  output logic psdone,
  output logic [TAP_BITS-1:0] tap
);
  localparam int unsigned MAX_TAP = (1 << TAP_BITS) - 1;
  int unsigned cnt;
  logic        pending, dir;

  initial begin
    clk_out = 1'b0;
  end

  // Transport delay of the clock, tap * TAP_PS ps: every edge of clk_in is
  // replayed on clk_out by its own process, so several edges may be in flight
  // when the delay is longer than half a clock period.
  always @(clk_in) begin
    automatic logic        level = clk_in;
    automatic int unsigned dly   = tap * TAP_PS;
    fork
      begin
        #(dly) clk_out = level;
      end
    join_none
  end

  always_ff @(posedge psclk or posedge rst) begin
    if (rst) begin
      tap <= '0; pending <= 1'b0; dir <= 1'b0; cnt <= 0; psdone <= 1'b0;
    end else begin
      psdone <= 1'b0;
      if (!pending && psen) begin
        pending <= 1'b1; dir <= psincdec; cnt <= 1;
      end else if (pending) begin
        if (cnt >= PS_LATENCY) begin
          pending <= 1'b0;
          psdone  <= 1'b1;
          if (dir && tap != MAX_TAP[TAP_BITS-1:0]) tap <= tap + 1'b1;
          else if (!dir && tap != '0)              tap <= tap - 1'b1;
        end else cnt <= cnt + 1;
      end
    end
  end
endmodule
