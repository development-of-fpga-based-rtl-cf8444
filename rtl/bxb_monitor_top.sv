// bxb_monitor_top: FPGA logic of a bunch-by-bunch (BxB) beam current monitor
// for a storage ring with 45 RF buckets. The sum signal of a button BPM is
// sampled by a 12-bit ADC once per RF period (204.03 MHz), at the peak of
// each bunch's pulse; the sample clock is the RF clock delayed by a
// programmable 0..1023 x 10 ps so that the sampling point can be moved onto
// the peak. One snapshot of 65536 consecutive samples (1456 turns of all 45
// buckets) is stored in a FIFO, starting at a fixed bucket given by SYN, the
// RF clock divided by 45, and then sent to a host over a USB bridge's
// slave-FIFO port. The host groups the samples by bucket; the mean of each
// group, scaled by the ring's total (DCCT) current over the sum of all means,
// is the current of each bunch.
// Blocks: diff_input_buffer (ADC data pairs), async_fifo (65536 x 12),
// fifo_controller (arm, SYN alignment, write until full, GPIF readout),
// freq_divider (/45, SYN and bunch number), phase_shifter + dcm_delay
// (sample clock delay), spi_regs (host control). The block diagram follows
// the document; the host control protocol, the USB handshake details and
// the clock-domain plan are this design's own (see each module).
// Clocks: rf_clk (RF, feeds divider and delay), adc_dco (ADC data clock, the
// FIFO's write clock, same frequency as rf_clk), sys_clk (USB interface
// clock: FIFO read side, SPI, phase shifter). rst_n is asynchronous.
// dcm_delay and diff_input_buffer are behavioural models of FPGA primitives,
// so this top simulates but is not synthesizable as it stands.
`timescale 1ps/1ps
module bxb_monitor_top #(
  parameter int unsigned HARMONIC   = bxb_pkg::HARMONIC,
  parameter int unsigned FIFO_DEPTH = bxb_pkg::FIFO_DEPTH,
  parameter int unsigned ADC_BITS   = bxb_pkg::ADC_BITS,
  parameter int unsigned TAP_BITS   = bxb_pkg::TAP_BITS,
  parameter int unsigned TAP_PS     = bxb_pkg::TAP_PS
) (
  input  logic                        rf_clk,
  input  logic                        sys_clk,
  input  logic                        rst_n,
  // ADC
  input  logic                        adc_dco,
  input  logic [ADC_BITS-1:0]         adc_d_p,
  input  logic [ADC_BITS-1:0]         adc_d_n,
  output logic                        sample_clk,
  // turn marker
  output logic                        syn,
  output logic [$clog2(HARMONIC)-1:0] bunch_no,
  // SPI from host
  input  logic                        spi_sclk,
  input  logic                        spi_cs_n,
  input  logic                        spi_mosi,
  output logic                        spi_miso,
  // USB bridge slave FIFO (GPIF)
  output logic [bxb_pkg::USB_BITS-1:0] fx2_fd,
  output logic                        fx2_slwr_n,
  output logic                        fx2_pktend_n,
  input  logic                        fx2_full_n
);
  // ---------------- resets per domain ----------------
  logic wr_rst_n, sys_rst_n, rf_rst_n;
  sync_bit u_rst_wr  (.clk(adc_dco), .rst_n(rst_n), .d(1'b1), .q(wr_rst_n));
  sync_bit u_rst_sys (.clk(sys_clk), .rst_n(rst_n), .d(1'b1), .q(sys_rst_n));
  sync_bit u_rst_rf  (.clk(rf_clk),  .rst_n(rst_n), .d(1'b1), .q(rf_rst_n));

  // ---------------- ADC data path ----------------
  logic [ADC_BITS-1:0] adc_data, fifo_rdata;
  logic fifo_wr, fifo_rd, fifo_full, fifo_empty, fifo_rst;

  diff_input_buffer #(.WIDTH(ADC_BITS)) u_ibuf (
    .in_p(adc_d_p), .in_n(adc_d_n), .out(adc_data));

  async_fifo #(.WIDTH(ADC_BITS), .DEPTH(FIFO_DEPTH)) u_fifo (
    .rst(fifo_rst || !rst_n),
    .wr_clk(adc_dco), .wr(fifo_wr), .wdata(adc_data), .full(fifo_full),
    .rd_clk(sys_clk), .rd(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty));

  // ---------------- SYN ----------------
  freq_divider #(.DIV(HARMONIC)) u_div (
    .rf_clk(rf_clk), .rst_n(rf_rst_n), .syn(syn), .bunch_no(bunch_no));

  // ---------------- control ----------------
  logic                arm, capturing, reading, done, ps_busy;
  logic [TAP_BITS-1:0] target_tap, cur_tap;
  bxb_pkg::status_t    status;

  assign status = '{ps_busy: ps_busy, done: done, reading: reading, capturing: capturing};

  spi_regs #(.TAP_W(TAP_BITS)) u_spi (
    .clk(sys_clk), .rst_n(sys_rst_n),
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .arm(arm), .target_tap(target_tap), .status(status), .cur_tap(cur_tap));

  fifo_controller #(.WIDTH(ADC_BITS), .DEPTH(FIFO_DEPTH)) u_ctrl (
    .wr_clk(adc_dco), .wr_rst_n(wr_rst_n), .syn(syn),
    .fifo_full(fifo_full), .fifo_wr(fifo_wr),
    .clk(sys_clk), .rst_n(sys_rst_n), .arm(arm), .fifo_rst(fifo_rst),
    .fifo_empty(fifo_empty), .fifo_rd(fifo_rd), .fifo_rdata(fifo_rdata),
    .fx2_fd(fx2_fd), .fx2_slwr_n(fx2_slwr_n), .fx2_pktend_n(fx2_pktend_n),
    .fx2_full_n(fx2_full_n),
    .capturing(capturing), .reading(reading), .done(done));

  // ---------------- sample clock phase ----------------
  logic ps_en, ps_incdec, ps_done;

  phase_shifter #(.TAP_BITS(TAP_BITS)) u_ps (
    .clk(sys_clk), .rst_n(sys_rst_n), .target_tap(target_tap), .cur_tap(cur_tap),
    .busy(ps_busy), .ps_en(ps_en), .ps_incdec(ps_incdec), .ps_done(ps_done));

  dcm_delay #(.TAP_BITS(TAP_BITS), .TAP_PS(TAP_PS)) u_dcm (
    .clk_in(rf_clk), .rst(!rst_n), .clk_out(sample_clk),
    .psclk(sys_clk), .psen(ps_en), .psincdec(ps_incdec), .psdone(ps_done), .tap());
endmodule
