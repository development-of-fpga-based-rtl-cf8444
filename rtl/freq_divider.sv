// freq_divider: divides the RF clock (204.03 MHz) by the harmonic number 45
// to give SYN, a one-cycle pulse once per turn (4.534 MHz), and the number of
// the bucket (bunch) now passing, 0..DIV-1. The bunch number is a modulo-DIV
// counter; SYN is high while it is 0. Division by 45 and the name SYN follow
// the document; making SYN a one-cycle pulse at count 0 and bringing out the
// count as bunch number is this design's choice.
// Timing: after reset release bunch_no counts 0,1,..,DIV-1,0,.. one step per
// rf_clk edge and syn is high in every cycle where bunch_no is 0.
`timescale 1ps/1ps
module freq_divider #(
  parameter int unsigned DIV = bxb_pkg::HARMONIC
) (
  input  logic                     rf_clk,
  input  logic                     rst_n,
  output logic                     syn,
  output logic [$clog2(DIV)-1:0]   bunch_no
);
  always_ff @(posedge rf_clk or negedge rst_n) begin
    if (!rst_n)                      bunch_no <= '0;
    else if (bunch_no == DIV[$clog2(DIV)-1:0] - 1'b1) bunch_no <= '0;
    else                             bunch_no <= bunch_no + 1'b1;
  end
  assign syn = (bunch_no == '0);
endmodule
