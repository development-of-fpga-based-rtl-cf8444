// fx2_model: testbench model of the USB 2.0 bridge's slave FIFO as seen by
// the FPGA. Words written with slwr_n low on a rising ifclk edge enter an
// endpoint buffer of CAP words; the host side removes one word per cycle
// with probability drain_pct percent unless host_hold is high. full_n is an
// almost-full flag: it is low when CAP-1 or more words are buffered, so one
// write may still arrive in the cycle after it falls. Every word written is
// also appended to the queue rx (what the host receives); pktend_n pulses
// are counted; a write into a full buffer counts as an overflow.
`timescale 1ps/1ps
module fx2_model #(
  parameter int CAP = 256
) (
  input  logic        ifclk,
  input  logic [15:0] fd,
  input  logic        slwr_n,
  input  logic        pktend_n,
  output logic        full_n,
  input  logic        host_hold,
  input  int          drain_pct
);
  logic [15:0] rx[$];
  int occ = 0, n_pktend = 0, n_overflow = 0, n_full_cycles = 0;

  assign full_n = (occ < CAP - 1);

  always @(posedge ifclk) begin
    int o;
    o = occ;
    if (!slwr_n) begin
      if (o >= CAP) n_overflow++;
      else begin o++; rx.push_back(fd); end
    end
    if (!pktend_n) n_pktend++;
    if (!full_n) n_full_cycles++;
    if (!host_hold && o > 0 && ($urandom % 100) < drain_pct) o--;
    occ <= o;
  end

  function automatic void clear();
    rx.delete();
    n_pktend = 0; n_overflow = 0; n_full_cycles = 0;
  endfunction
endmodule
