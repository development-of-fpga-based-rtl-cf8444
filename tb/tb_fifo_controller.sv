// tb_fifo_controller: one acquisition sequence of the FIFO controller with a
// 64-word FIFO (so that the last USB packet is short and needs PKTEND), the
// real async_fifo and a model of the USB slave FIFO that stalls.
// The "ADC" writes a running sample number modulo 4095 (= 45 x 91); SYN comes every 45 RF cycles at
// a known sample number. Checks, for three arms in a row:
//  - exactly DEPTH words arrive, consecutive sample numbers, the first one a
//    fixed distance after the SYN sample (the same for every arm),
//  - every arm with the same offset from SYN (bunch alignment),
//  - one PKTEND per snapshot, no USB buffer overflow, done set at the end,
//  - back-pressure happened (full flag seen low while reading),
//  - with the USB side never full, one word per clk cycle (DEPTH words in
//    DEPTH+1 cycles of fx2_slwr_n activity window).
`timescale 1ps/1ps
module tb_fifo_controller;
  localparam int DEPTH = 64, H = 45;
  logic wr_clk = 0, clk = 0, wr_rst_n = 0, rst_n = 0;
  logic syn, fifo_full, fifo_wr, arm = 0, fifo_rst, fifo_empty, fifo_rd;
  logic [11:0] fifo_rdata, adc;
  logic [15:0] fx2_fd;
  logic fx2_slwr_n, fx2_pktend_n, fx2_full_n, host_hold = 0;
  int drain_pct = 30;
  logic capturing, reading, done;
  int checks = 0, failures = 0;
  int sample_no = 0;
  int first_offset[3];
  int n_stall = 0;

  always #2451  wr_clk = ~wr_clk;
  always #10417 clk = ~clk;

  // sample counter and SYN (SYN when sample_no % H == 0)
  always @(posedge wr_clk) sample_no <= sample_no + 1;
  assign adc = 12'(sample_no % 4095);   // 4095 = 45 * 91 keeps the bucket visible
  assign syn = (sample_no % H == 0);

  fifo_controller #(.WIDTH(12), .DEPTH(DEPTH)) dut (
    .wr_clk, .wr_rst_n, .syn, .fifo_full, .fifo_wr,
    .clk, .rst_n, .arm, .fifo_rst, .fifo_empty, .fifo_rd, .fifo_rdata,
    .fx2_fd, .fx2_slwr_n, .fx2_pktend_n, .fx2_full_n,
    .capturing, .reading, .done);

  async_fifo #(.WIDTH(12), .DEPTH(DEPTH)) u_fifo (
    .rst(fifo_rst || !rst_n), .wr_clk, .wr(fifo_wr), .wdata(adc), .full(fifo_full),
    .rd_clk(clk), .rd(fifo_rd), .rdata(fifo_rdata), .empty(fifo_empty));

  fx2_model #(.CAP(16)) u_fx2 (
    .ifclk(clk), .fd(fx2_fd), .slwr_n(fx2_slwr_n), .pktend_n(fx2_pktend_n),
    .full_n(fx2_full_n), .host_hold, .drain_pct);

  always @(posedge clk) if (reading && !fx2_full_n) n_stall++;

  task automatic run(input int k, input logic no_stall);
    int t0, t1, cyc;
    u_fx2.clear();
    host_hold = 0;
    @(negedge clk) arm = 1;
    @(negedge clk) arm = 0;
    checks++;
    if (!capturing) begin failures++; $display("arm %0d: not capturing", k); end
    cyc = 0; t0 = -1; t1 = -1;
    while (!done && cyc < 100000) begin
      @(posedge clk); cyc++;
      if (!fx2_slwr_n) begin if (t0 < 0) t0 = cyc; t1 = cyc; end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (u_fx2.rx.size() != DEPTH) begin failures++; $display("arm %0d: %0d words", k, u_fx2.rx.size()); end
    else begin
      for (int i = 1; i < DEPTH; i++) begin
        checks++;
        if (u_fx2.rx[i] != 16'((u_fx2.rx[0] + i) % 4095)) begin
          failures++; $display("arm %0d: word %0d = %0d after %0d", k, i, u_fx2.rx[i], u_fx2.rx[0]);
        end
      end
      first_offset[k] = int'(u_fx2.rx[0][11:0]) % H;   // sample number mod 45
    end
    checks++;
    if (u_fx2.n_pktend != 1 || u_fx2.n_overflow != 0) begin
      failures++; $display("arm %0d: pktend %0d overflow %0d", k, u_fx2.n_pktend, u_fx2.n_overflow);
    end
    if (no_stall) begin
      checks++;
      if (t1 - t0 + 1 != DEPTH) begin failures++; $display("arm %0d: %0d words took %0d cycles", k, DEPTH, t1 - t0 + 1); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    wr_rst_n = 1; rst_n = 1;
    repeat (5) @(posedge clk);
    run(0, 0);
    run(1, 0);
    // no back-pressure: a fast host
    drain_pct = 100;
    run(2, 1);
    checks++;
    if (first_offset[0] != first_offset[1] || first_offset[1] != first_offset[2]) begin
      failures++; $display("SYN offsets differ: %0d %0d %0d", first_offset[0], first_offset[1], first_offset[2]);
    end
    checks++;
    // SYN passes 2 flops, the write starts 1 cycle after it is seen: offset 3
    if (first_offset[0] != 3) begin failures++; $display("offset from SYN %0d, want 3", first_offset[0]); end
    checks++;
    if (n_stall == 0) begin failures++; $display("no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
