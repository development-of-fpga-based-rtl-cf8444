// tb_bxb_monitor_top: end-to-end run of the whole monitor at its default
// sizes (45 buckets, 65536-sample snapshots, 10-bit phase tap). The beam and
// ADC are modelled by adc_model (a 34-bunch train in buckets 0..33 and a
// single bunch in bucket 40), the USB bridge by fx2_model (drains 60% of
// cycles, so the FPGA is throttled), and the host by SPI transfers plus the
// analysis in this file: group the snapshot by bucket, take the mean of each
// group of 1456 turns, and calibrate with the total (DCCT) current,
// I_i = K A_i with K = I_dcct / sum A_i.
// Sequence:
//  1. read STATUS over SPI (idle), set the tap to 300 (3.0 ns) and wait for
//     CUR_TAP; measure the sample clock delay against the RF clock;
//  2. capture 1: every word must equal the model's code for its bucket at
//     that tap, under one single bucket rotation r (SYN alignment);
//  3. tap down to 250, capture 2: new codes, same r;
//  4. tap back to 300 with bucket 9 oscillating longitudinally at 25 kHz:
//     capture 3; the spectrum of bucket 9's turn-by-turn samples must peak
//     at twice the oscillation frequency, 50 kHz.
// Mechanisms counted (each must happen): SPI reads, phase steps up and down,
// FIFO-full end of capture, USB back-pressure, SYN-aligned captures.
`timescale 1ps/1ps
module tb_bxb_monitor_top;
  import bxb_pkg::*;
  localparam int  H = 45, DEPTH = 65536, TURNS = DEPTH / H;   // 1456
  localparam int  T_RF = 4902;                                 // 204.03 MHz
  localparam real F_REV = 1.0e12 / (H * T_RF);                 // ~4.534 MHz
  localparam real I_DCCT = 300.0;                              // mA

  logic rf_clk = 0, sys_clk = 0, rst_n = 0;
  logic adc_dco, sample_clk, syn;
  logic [11:0] adc_d_p, adc_d_n;
  logic [5:0] bunch_no;
  logic spi_sclk, spi_cs_n, spi_mosi, spi_miso;
  logic [15:0] fx2_fd;
  logic fx2_slwr_n, fx2_pktend_n, fx2_full_n;
  int drain_pct = 60;

  always #(T_RF/2) rf_clk = ~rf_clk;
  always #10417 sys_clk = ~sys_clk;          // 48 MHz USB interface clock

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

  int checks = 0, failures = 0;
  int n_spi_reads = 0, n_ps_inc = 0, n_ps_dec = 0, n_fifo_full = 0, n_usb_stall = 0, n_syn_aligned = 0;
  int r_first = -1;
  logic wr_q = 0;

  always @(posedge sys_clk) if (dut.sys_rst_n) begin
    if (dut.ps_en &&  dut.ps_incdec) n_ps_inc++;
    if (dut.ps_en && !dut.ps_incdec) n_ps_dec++;
    if (dut.reading && !fx2_full_n) n_usb_stall++;
  end
  always @(posedge adc_dco) begin
    if (wr_q && dut.fifo_full) n_fifo_full++;
    wr_q <= dut.fifo_wr;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  task automatic spi_read(input spi_reg_e a, output logic [11:0] v);
    host.xfer(1'b1, a, 12'h0, v);
    n_spi_reads++;
  endtask

  task automatic spi_write(input spi_reg_e a, input logic [11:0] v);
    logic [11:0] dummy;
    host.xfer(1'b0, a, v, dummy);
  endtask

  task automatic set_tap(input int tap);
    logic [11:0] v;
    int n;
    spi_write(REG_TAP, 12'(tap));
    n = 0;
    do begin spi_read(REG_CUR_TAP, v); n++; end while (v != 12'(tap) && n < 200);
    checks++;
    if (v != 12'(tap)) fail($sformatf("phase tap stuck at %0d, want %0d", v, tap));
  endtask

  task automatic check_delay(input int tap);
    longint t_rf, d;
    @(posedge rf_clk) t_rf = $time;
    @(posedge sample_clk);
    @(posedge sample_clk);
    d = ($time - t_rf) % longint'(T_RF);
    checks++;
    if (d != longint'((tap * 10) % T_RF)) fail($sformatf("sample clock delay %0d ps at tap %0d", d, tap));
  endtask

  // One snapshot: arm, wait for the host to have all words, check STATUS.done
  task automatic capture();
    logic [11:0] st;
    int n;
    usb.clear();
    spi_write(REG_CTRL, 12'h001);
    n = 0;
    do begin
      repeat (2000) @(posedge sys_clk);
      spi_read(REG_STATUS, st); n++;
    end while (!st[2] && n < 400);   // bit 2: done
    checks++;
    if (!st[2]) fail("capture did not finish");
    checks++;
    if (usb.rx.size() != DEPTH) fail($sformatf("host received %0d words", usb.rx.size()));
    checks++;
    if (usb.n_overflow != 0) fail("USB buffer overflow");
  endtask

  // Find the bucket rotation r with rx[k] == code(bucket (k + r) % H) and check every word
  task automatic check_snapshot(input int tap, input int skip_bunch, output int r);
    int n_match, bad;
    r = -1; n_match = 0;
    for (int rr = 0; rr < H; rr++) begin
      bad = 0;
      for (int k = 0; k < H; k++)
        if ((k + rr) % H != skip_bunch && usb.rx[k] != 16'(adc.code_of((k + rr) % H, real'(tap * 10), 0.0))) bad++;
      if (bad == 0) begin r = rr; n_match++; end
    end
    checks++;
    if (n_match != 1) begin fail($sformatf("%0d bucket rotations match the data", n_match)); r = 0; end
    bad = 0;
    for (int k = 0; k < DEPTH; k++) begin
      int b;
      b = (k + r) % H;
      if (b != skip_bunch && usb.rx[k] != 16'(adc.code_of(b, real'(tap * 10), 0.0))) bad++;
    end
    checks++;
    if (bad != 0) fail($sformatf("%0d words differ from the beam model", bad));
    if (r_first < 0) r_first = r;
    checks++;
    if (r == r_first) n_syn_aligned++;
    else fail($sformatf("bucket rotation %0d, first capture had %0d", r, r_first));
  endtask

  // Host analysis: per-bucket means over TURNS turns and DCCT calibration
  task automatic check_calibration(input int tap, input int r);
    real a[H], e[H], sa, se, kcal;
    sa = 0; se = 0;
    for (int b = 0; b < H; b++) begin a[b] = 0; e[b] = adc.code_of(b, real'(tap * 10), 0.0) - 2048; se += e[b]; end
    for (int k = 0; k < TURNS * H; k++) a[(k + r) % H] += (real'(usb.rx[k]) - 2048.0) / TURNS;
    for (int b = 0; b < H; b++) sa += a[b];
    kcal = I_DCCT / sa;
    for (int b = 0; b < H; b++) begin
      real ib, ie;
      ib = kcal * a[b];
      ie = I_DCCT * e[b] / se;
      checks++;
      if (ib - ie > 0.001 || ie - ib > 0.001) fail($sformatf("bunch %0d current %f mA, want %f", b, ib, ie));
    end
    $display("calibration: K = %f mA/code, bunch 0 = %f mA, bunch 40 = %f mA", kcal, kcal * a[0], kcal * a[40]);
  endtask

  // Spectrum of one bucket's turn-by-turn samples; returns the frequency of the largest line
  task automatic peak_freq(input int bunch, input int r, output real f_peak);
    real x[TURNS], m, best;
    int nb, k0;
    m = 0; nb = 0;
    k0 = (bunch - r + H) % H;                    // first word of this bucket
    for (int t = 0; t < TURNS; t++) begin x[t] = real'(usb.rx[k0 + t * H]); m += x[t] / TURNS; end
    best = -1; f_peak = 0;
    for (int bin = 1; bin < 200; bin++) begin
      real re, im, p;
      re = 0; im = 0;
      for (int t = 0; t < TURNS; t++) begin
        re += (x[t] - m) * $cos(2.0 * 3.14159265358979 * bin * t / TURNS);
        im += (x[t] - m) * $sin(2.0 * 3.14159265358979 * bin * t / TURNS);
      end
      p = re * re + im * im;
      if (p > best) begin best = p; nb = bin; end
    end
    f_peak = nb * F_REV / TURNS;
  endtask

  initial begin
    logic [11:0] st;
    int r1, r2, r3;
    real fp;
    // Filling pattern: a 34-bunch train and one single bunch
    for (int b = 0; b < 34; b++) adc.amp[b] = 800 + 25 * b;
    adc.amp[40] = 1900;

    repeat (5) @(posedge sys_clk);
    rst_n = 1;
    repeat (10) @(posedge sys_clk);

    spi_read(REG_STATUS, st);
    checks++;
    if (st != 12'h0) fail($sformatf("status after reset %h", st));

    // 1. put the sampling point on the pulse peak
    set_tap(300);
    check_delay(300);
    capture();
    check_snapshot(300, -1, r1);
    check_calibration(300, r1);

    // 2. sample 0.5 ns earlier
    set_tap(250);
    check_delay(250);
    capture();
    check_snapshot(250, -1, r2);

    // 3. longitudinal oscillation of bucket 9 at 25 kHz, 300 ps amplitude
    set_tap(300);
    adc.osc_bunch = 9; adc.osc_amp_ps = 300.0; adc.osc_hz = 25000.0;
    capture();
    check_snapshot(300, 9, r3);
    peak_freq(9, r3, fp);
    $display("bunch 9 spectrum peak at %f kHz", fp / 1000.0);
    checks++;
    if (fp < 46000.0 || fp > 54000.0) fail($sformatf("spectrum peak at %f Hz, want 50 kHz", fp));

    // every mechanism must have happened
    $display("mechanisms: spi_reads=%0d ps_inc=%0d ps_dec=%0d fifo_full=%0d usb_stall_cycles=%0d syn_aligned=%0d",
             n_spi_reads, n_ps_inc, n_ps_dec, n_fifo_full, n_usb_stall, n_syn_aligned);
    checks++; if (n_spi_reads == 0) fail("no SPI read");
    checks++; if (n_ps_inc != 350) fail($sformatf("%0d phase steps up, want 350", n_ps_inc));
    checks++; if (n_ps_dec != 50) fail($sformatf("%0d phase steps down, want 50", n_ps_dec));
    checks++; if (n_fifo_full != 3) fail($sformatf("%0d captures ended full, want 3", n_fifo_full));
    checks++; if (n_usb_stall == 0) fail("no USB back-pressure");
    checks++; if (n_syn_aligned != 3) fail("captures not aligned to SYN");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
