// tb_dcm_delay: the clock manager model. A 204.03 MHz clock (period 4902 ps)
// goes in; the testbench steps the tap with PSEN/PSINCDEC pulses and checks
// that PSDONE comes PS_LATENCY+1 PSCLK edges after PSEN, that the tap
// saturates at 0 and 1023, and that every rising edge of clk_out trails a
// rising edge of clk_in by tap * 10 ps (modulo the clock period).
`timescale 1ps/1ps
module tb_dcm_delay;
  localparam int T = 4902;
  logic clk_in = 0, psclk = 0, rst = 1, psen = 0, psincdec = 0;
  logic clk_out, psdone;
  logic [9:0] tap;
  int checks = 0, failures = 0;
  longint t_in;

  dcm_delay #(.TAP_BITS(10), .TAP_PS(10), .PS_LATENCY(4)) dut (
    .clk_in, .rst, .clk_out, .psclk, .psen, .psincdec, .psdone, .tap);

  always #(T/2) clk_in = ~clk_in;
  always #10417 psclk = ~psclk;
  always @(posedge clk_in) t_in = $time;

  task automatic step(input logic up, input int n);
    for (int i = 0; i < n; i++) begin
      int c;
      @(negedge psclk) begin psen = 1; psincdec = up; end
      @(negedge psclk) psen = 0;
      c = 1;
      while (!psdone && c < 20) begin @(negedge psclk); c++; end
      if (i == 0) begin
        checks++;
        if (c != 5) begin failures++; $display("PSDONE after %0d PSCLK cycles", c); end
      end
    end
  endtask

  task automatic measure(input int want_tap);
    longint d;
    checks++;
    if (tap != 10'(want_tap)) begin failures++; $display("tap %0d want %0d", tap, want_tap); end
    repeat (3) @(posedge clk_in);   // let edges scheduled with the old delay pass
    repeat (3) @(posedge clk_out);
    @(posedge clk_out);
    d = ($time - t_in) % T;
    checks++;
    if (d != (want_tap * 10) % T) begin
      failures++; $display("tap %0d: delay %0d ps, want %0d", want_tap, d, (want_tap * 10) % T);
    end
  endtask

  initial begin
    repeat (3) @(posedge psclk);
    rst = 0;
    measure(0);
    step(1, 1);   measure(1);
    step(1, 299); measure(300);
    step(0, 50);  measure(250);
    step(1, 773); measure(1023);
    step(1, 3);   measure(1023);    // saturates
    step(0, 1023); measure(0);
    step(0, 2);   measure(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
