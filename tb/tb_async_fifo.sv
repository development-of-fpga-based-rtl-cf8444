// tb_async_fifo: two checks of the dual-clock sample FIFO.
// 1) A 16-deep instance with unrelated write (5 ns) and read (21 ns) clocks
//    and random wr/rd requests: every word read must be the oldest word
//    written (reference queue), full must never let more than DEPTH words in
//    and empty must never lose one.
// 2) An instance at the full depth, 65536: write until full, which must
//    happen after exactly 65536 words, then read all back in order until
//    empty, and check the read latency of one rd_clk edge.
`timescale 1ps/1ps
module tb_async_fifo;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0;
  always #2500  wclk = ~wclk;
  always #10500 rclk = ~rclk;

  // ---------------- small instance ----------------
  localparam int SD = 16;
  logic s_rst, s_wr, s_full, s_rd, s_empty;
  logic [11:0] s_wdata, s_rdata;
  logic [11:0] q[$];
  async_fifo #(.WIDTH(12), .DEPTH(SD)) u_small (
    .rst(s_rst), .wr_clk(wclk), .wr(s_wr), .wdata(s_wdata), .full(s_full),
    .rd_clk(rclk), .rd(s_rd), .rdata(s_rdata), .empty(s_empty));

  // ---------------- full-size instance ----------------
  localparam int BD = 65536;
  logic b_rst, b_wr, b_full, b_rd, b_empty;
  logic [11:0] b_wdata, b_rdata;
  async_fifo #(.WIDTH(12), .DEPTH(BD)) u_big (
    .rst(b_rst), .wr_clk(wclk), .wr(b_wr), .wdata(b_wdata), .full(b_full),
    .rd_clk(rclk), .rd(b_rd), .rdata(b_rdata), .empty(b_empty));

  int n_full_seen = 0, n_empty_seen = 0, n_rd = 0, max_occ = 0;
  logic small_done = 0;

  // small: writer
  initial begin
    s_rst = 1; s_wr = 0; s_wdata = 0;
    repeat (4) @(posedge rclk);
    s_rst = 0;
    repeat (5) @(posedge wclk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk);
      // bursts: fast writer phases then idle phases
      s_wr = ((i / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 8 == 0);
      if (s_wr && s_full) s_wr = 0;
      s_wdata = 12'($urandom);
      if (s_full) n_full_seen++;
      @(posedge wclk);
      if (s_wr) q.push_back(s_wdata);
      if (q.size() - n_rd > max_occ) max_occ = q.size() - n_rd;
    end
    s_wr = 0;
    small_done = 1;
  end

  // small: reader
  initial begin
    logic pend;
    pend = 0; s_rd = 0;
    wait (!s_rst);
    forever begin
      @(negedge rclk);
      if (pend) begin
        checks++;
        if (n_rd >= q.size() || s_rdata != q[n_rd]) begin
          failures++; $display("small fifo: word %0d got %h", n_rd, s_rdata);
        end
        n_rd++;
      end
      s_rd = ($urandom % 3 != 0) && !s_empty;
      if (s_empty) n_empty_seen++;
      pend = s_rd;
    end
  end

  initial begin
    int i;
    b_rst = 1; b_wr = 0; b_rd = 0; b_wdata = 0;
    wait (small_done);
    repeat (200) @(posedge rclk);   // let the small reader drain
    checks++;
    if (n_rd != q.size()) begin failures++; $display("small fifo: read %0d of %0d", n_rd, q.size()); end
    checks++;
    if (max_occ > SD || n_full_seen == 0 || n_empty_seen == 0) begin
      failures++; $display("small fifo: max_occ=%0d full_seen=%0d empty_seen=%0d", max_occ, n_full_seen, n_empty_seen);
    end

    // full-size fill and drain
    b_rst = 0;
    repeat (4) @(posedge wclk);
    i = 0;
    @(negedge wclk);
    while (!b_full && i < BD + 10) begin
      b_wr = 1; b_wdata = 12'(i * 7 + 3);
      @(posedge wclk); i++;
      @(negedge wclk);
    end
    b_wr = 0;
    checks++;
    if (i != BD) begin failures++; $display("big fifo: full after %0d words", i); end
    repeat (4) @(posedge rclk);
    for (int k = 0; k < BD; k++) begin
      @(negedge rclk);
      if (b_empty) begin failures++; $display("big fifo: empty at %0d", k); break; end
      b_rd = 1;
      @(posedge rclk); #1;
      b_rd = 0;
      checks++;
      if (b_rdata != 12'(k * 7 + 3)) begin failures++; $display("big fifo: word %0d got %h", k, b_rdata); end
    end
    repeat (3) @(posedge rclk);
    checks++;
    if (!b_empty) begin failures++; $display("big fifo: not empty after all reads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
