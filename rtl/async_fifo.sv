// async_fifo: dual-clock FIFO that holds one snapshot of ADC samples.
// The write side runs on the ADC data clock (wr_clk), the read side on the
// USB interface clock (rd_clk). Depth 65536 x 12 bit, with full, empty, wr,
// rd and rst as in the document's block diagram; the FIFO itself is written
// here as a memory array with Gray-coded pointers, which is this design's
// choice (the document used the FPGA's FIFO).
// How it works: each side keeps a binary pointer one bit wider than the
// address and its Gray code. The Gray code crosses to the other side through
// two flops. full is registered on the write side (next write pointer equals
// the read pointer with the two top bits inverted), empty on the read side
// (next read pointer equals the synchronized write pointer).
// Timing: a write with wr=1 and full=0 stores wdata at the wr_clk edge. A read
// with rd=1 and empty=0 presents the oldest word on rdata after the next
// rd_clk edge (registered output). rst is asynchronous, active high, and is
// released synchronously in each domain; both flags read "full/empty" while
// reset is held. A write becomes visible to the read side 3 rd_clk edges later.
`timescale 1ps/1ps
module async_fifo #(
  parameter int unsigned WIDTH = bxb_pkg::ADC_BITS,
  parameter int unsigned DEPTH = bxb_pkg::FIFO_DEPTH
) (
  input  logic             rst,      // asynchronous, active high
  input  logic             wr_clk,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rd_clk,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  // Reset release per domain
  logic wr_rst_n, rd_rst_n;
  sync_bit u_wr_rst (.clk(wr_clk), .rst_n(!rst), .d(1'b1), .q(wr_rst_n));
  sync_bit u_rd_rst (.clk(rd_clk), .rst_n(!rst), .d(1'b1), .q(rd_rst_n));

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Pointers of both sides (binary and Gray)
  logic [AW:0] wbin, wgray, wbin_next, wgray_next;
  logic [AW:0] rbin, rgray, rbin_next, rgray_next;

  // ---------------- write side ----------------
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in wr_clk domain
  logic        do_wr;

  assign do_wr      = wr && !full;
  assign wbin_next  = wbin + (AW+1)'(do_wr);
  assign wgray_next = bin2gray(wbin_next);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      full     <= 1'b1;
    end else begin
      wbin     <= wbin_next;
      wgray    <= wgray_next;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      full     <= (wgray_next == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
    end
  end

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---------------- read side ----------------
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in rd_clk domain
  logic        do_rd;

  assign do_rd      = rd && !empty;
  assign rbin_next  = rbin + (AW+1)'(do_rd);
  assign rgray_next = bin2gray(rbin_next);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      empty    <= 1'b1;
    end else begin
      rbin     <= rbin_next;
      rgray    <= rgray_next;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      empty    <= (rgray_next == wgray_r2);
    end
  end

  always_ff @(posedge rd_clk) begin
    if (do_rd) rdata <= mem[rbin[AW-1:0]];
  end

  // Handshake rules: the user never writes into a full FIFO or reads an empty one
  // (the FIFO ignores such requests, but the controller is expected not to issue them).
  property p_no_overflow;  @(posedge wr_clk) disable iff (!wr_rst_n) wr |-> !full;  endproperty
  property p_no_underflow; @(posedge rd_clk) disable iff (!rd_rst_n) rd |-> !empty; endproperty
  a_no_overflow:  assert property (p_no_overflow);
  a_no_underflow: assert property (p_no_underflow);

  initial begin
    assert (DEPTH == (1 << AW) && AW >= 2) else $error("DEPTH must be a power of two >= 4");
  end
endmodule
