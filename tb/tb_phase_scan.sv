// tb_phase_scan: the set-up procedure of the monitor. Because the ADC must
// sample each bunch's pulse at its peak, the host sweeps the sample clock
// delay and keeps the tap where the snapshot's total signal is largest.
// Here the whole monitor at default sizes is swept over taps 0..480 in steps
// of 20 (0 to 4.8 ns, about one RF period); at each tap one full 65536-word
// snapshot is taken and the host sums (code - 2048) over the first 1456 turns.
// Checks: each sum equals the beam model's prediction for that delay, and
// the largest sum is at tap 300, where the modelled pulse peaks (3.0 ns).
`timescale 1ps/1ps
module tb_phase_scan;
  import bxb_pkg::*;
  localparam int H = 45, DEPTH = 65536, TURNS = DEPTH / H;
  localparam int T_RF = 4902;

  logic rf_clk = 0, sys_clk = 0, rst_n = 0;
  logic adc_dco, sample_clk, syn;
  logic [11:0] adc_d_p, adc_d_n;
  logic [5:0] bunch_no;
  logic spi_sclk, spi_cs_n, spi_mosi, spi_miso;
  logic [15:0] fx2_fd;
  logic fx2_slwr_n, fx2_pktend_n, fx2_full_n;
  int drain_pct = 100;
  int checks = 0, failures = 0;

  always #(T_RF/2) rf_clk = ~rf_clk;
  always #10417 sys_clk = ~sys_clk;

  bxb_monitor_top dut (
    .rf_clk, .sys_clk, .rst_n,
    .adc_dco, .adc_d_p, .adc_d_n, .sample_clk, .syn, .bunch_no,
    .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso,
    .fx2_fd, .fx2_slwr_n, .fx2_pktend_n, .fx2_full_n);

  adc_model #(.H(H), .T_PS(T_RF), .PEAK_PS(3000), .W_PS(2000), .LAT(10)) adc (
    .rf_clk, .sample_clk, .d_p(adc_d_p), .d_n(adc_d_n), .dco(adc_dco));

  fx2_model #(.CAP(256)) usb (
    .ifclk(sys_clk), .fd(fx2_fd), .slwr_n(fx2_slwr_n), .pktend_n(fx2_pktend_n),
    .full_n(fx2_full_n), .host_hold(1'b0), .drain_pct);

  spi_master #(.HALF(100000)) host (.sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));

  task automatic set_tap(input int tap);
    logic [11:0] v, dummy;
    int n;
    host.xfer(1'b0, REG_TAP, 12'(tap), dummy);
    n = 0;
    do begin host.xfer(1'b1, REG_CUR_TAP, 12'h0, v); n++; end while (v != 12'(tap) && n < 200);
    checks++;
    if (v != 12'(tap)) begin failures++; $display("tap stuck at %0d", v); end
  endtask

  task automatic capture();
    logic [11:0] st, dummy;
    int n;
    usb.clear();
    host.xfer(1'b0, REG_CTRL, 12'h001, dummy);
    n = 0;
    do begin
      repeat (2000) @(posedge sys_clk);
      host.xfer(1'b1, REG_STATUS, 12'h0, st); n++;
    end while (!st[2] && n < 400);
    checks++;
    if (usb.rx.size() != DEPTH) begin failures++; $display("got %0d words", usb.rx.size()); end
  endtask

  initial begin
    longint sum, want, best_sum;
    int best_tap;
    for (int b = 0; b < 34; b++) adc.amp[b] = 800 + 25 * b;
    adc.amp[40] = 1900;
    repeat (5) @(posedge sys_clk);
    rst_n = 1;
    repeat (10) @(posedge sys_clk);
    best_sum = -1; best_tap = -1;
    for (int tap = 0; tap <= 480; tap += 20) begin
      set_tap(tap);
      capture();
      sum = 0;
      for (int k = 0; k < TURNS * H; k++) sum += longint'(usb.rx[k]) - 2048;
      want = 0;
      for (int b = 0; b < H; b++) want += longint'(adc.code_of(b, real'(tap * 10), 0.0) - 2048) * TURNS;
      checks++;
      if (sum != want) begin failures++; $display("tap %0d: sum %0d, want %0d", tap, sum, want); end
      $display("tap %0d (%0d ps): sum %0d", tap, tap * 10, sum);
      if (sum > best_sum) begin best_sum = sum; best_tap = tap; end
    end
    checks++;
    if (best_tap != 300) begin failures++; $display("peak found at tap %0d, want 300", best_tap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
