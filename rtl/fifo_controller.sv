// fifo_controller: runs one acquisition of the monitor. On an arm command it
// resets the sample FIFO, waits for SYN (the once-per-turn pulse) so that the
// first stored sample belongs to a fixed bucket, and lets the ADC samples
// flow into the FIFO at the RF rate until the FIFO is full. It then drains
// the FIFO to the USB bridge through its slave-FIFO (GPIF) port. The document
// gives this block's place and its signals (full, empty, wr, rd, rst, SYN,
// GPIF, SPI); the sequence below, and the choice of capturing exactly one
// full FIFO and only then reading it, are this design's reading of "the depth
// of FIFO ... determining the size of data for single sampling".
// Clock domains: the write side runs on wr_clk (ADC data clock, RF rate) and
// the read side on clk (USB interface clock, also the FIFO's rd_clk). The
// arm and "captured" events cross as toggles through two-flop synchronizers.
// Timing:
//  - fifo_rst is high for RST_CYCLES clk cycles after arm.
//  - The write side starts writing in the wr_clk cycle after it sees SYN
//    (SYN itself is synchronized through two flops, so the first stored
//    sample is a fixed number of buckets after the SYN bucket). It writes
//    every cycle until full: DEPTH consecutive samples.
//  - Reading: one FIFO read per clk cycle while the FIFO is not empty and
//    fx2_full_n is high; the word appears on fx2_fd with fx2_slwr_n low in
//    the next cycle. fx2_full_n is taken as an almost-full flag: one word may
//    still be written in the cycle after it falls.
//  - If DEPTH words do not fill a whole number of 512-byte USB packets,
//    fx2_pktend_n pulses low for one cycle after the last word.
`timescale 1ps/1ps
module fifo_controller
  import bxb_pkg::*;
#(
  parameter int unsigned WIDTH      = bxb_pkg::ADC_BITS,
  parameter int unsigned DEPTH      = bxb_pkg::FIFO_DEPTH,
  parameter int unsigned RST_CYCLES = 4,
  parameter int unsigned PKT_BYTES  = 512
) (
  // write side
  input  logic                 wr_clk,
  input  logic                 wr_rst_n,
  input  logic                 syn,          // once per turn, rf_clk domain
  input  logic                 fifo_full,
  output logic                 fifo_wr,
  // read / control side
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 arm,          // one-cycle pulse
  output logic                 fifo_rst,
  input  logic                 fifo_empty,
  output logic                 fifo_rd,
  input  logic [WIDTH-1:0]     fifo_rdata,
  // GPIF slave-FIFO port of the USB bridge
  output logic [USB_BITS-1:0]  fx2_fd,
  output logic                 fx2_slwr_n,
  output logic                 fx2_pktend_n,
  input  logic                 fx2_full_n,
  // status
  output logic                 capturing,
  output logic                 reading,
  output logic                 done
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;
  localparam bit NEED_PKTEND = ((DEPTH * (USB_BITS / 8)) % PKT_BYTES) != 0;

  // ---------------- control / read side (clk) ----------------
  typedef enum logic [2:0] {S_IDLE, S_RST, S_CAPT, S_READ, S_PKTEND} rd_state_e;
  rd_state_e state;
  logic [$clog2(RST_CYCLES+1)-1:0] rst_cnt;
  logic [CW-1:0] rd_cnt;
  logic arm_tgl, cap_tgl, cap_tgl_s, cap_tgl_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      rst_cnt      <= '0;
      rd_cnt       <= '0;
      arm_tgl      <= 1'b0;
      cap_tgl_d    <= 1'b0;
      fx2_slwr_n   <= 1'b1;
      fx2_pktend_n <= 1'b1;
      done         <= 1'b0;
    end else begin
      cap_tgl_d    <= cap_tgl_s;
      fx2_slwr_n   <= !fifo_rd;
      fx2_pktend_n <= 1'b1;
      unique case (state)
        S_IDLE: if (arm) begin
          state   <= S_RST;
          rst_cnt <= '0;
          done    <= 1'b0;
        end
        S_RST: begin
          rst_cnt <= rst_cnt + 1'b1;
          if (rst_cnt == ($bits(rst_cnt))'(RST_CYCLES - 1)) begin
            arm_tgl <= !arm_tgl;
            state   <= S_CAPT;
          end
        end
        S_CAPT: if (cap_tgl_s != cap_tgl_d) begin
          state  <= S_READ;
          rd_cnt <= '0;
        end
        S_READ: begin
          if (fifo_rd) rd_cnt <= rd_cnt + 1'b1;
          // leave once every word is read and the last write strobe has gone out
          if (rd_cnt == CW'(DEPTH) && !fifo_rd) begin
            if (NEED_PKTEND) state <= S_PKTEND;
            else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
        S_PKTEND: begin
          fx2_pktend_n <= 1'b0;
          state        <= S_IDLE;
          done         <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign fifo_rst  = (state == S_RST);
  assign fifo_rd   = (state == S_READ) && !fifo_empty && fx2_full_n && (rd_cnt != CW'(DEPTH));
  assign fx2_fd    = USB_BITS'(fifo_rdata);
  assign capturing = (state == S_RST) || (state == S_CAPT);
  assign reading   = (state == S_READ) || (state == S_PKTEND);

  sync_bit u_cap_sync (.clk(clk), .rst_n(rst_n), .d(cap_tgl), .q(cap_tgl_s));

  // ---------------- write side (wr_clk) ----------------
  typedef enum logic [1:0] {W_IDLE, W_ARMED, W_WRITE} wr_state_e;
  wr_state_e wstate;
  logic arm_tgl_s, arm_tgl_d, syn_s;

  sync_bit u_arm_sync (.clk(wr_clk), .rst_n(wr_rst_n), .d(arm_tgl), .q(arm_tgl_s));
  sync_bit u_syn_sync (.clk(wr_clk), .rst_n(wr_rst_n), .d(syn),     .q(syn_s));

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wstate    <= W_IDLE;
      arm_tgl_d <= 1'b0;
      cap_tgl   <= 1'b0;
    end else begin
      arm_tgl_d <= arm_tgl_s;
      unique case (wstate)
        W_IDLE:  if (arm_tgl_s != arm_tgl_d) wstate <= W_ARMED;
        // full is held high while the FIFO is in reset: wait for it to clear
        W_ARMED: if (syn_s && !fifo_full) wstate <= W_WRITE;
        W_WRITE: if (fifo_full) begin
          wstate  <= W_IDLE;
          cap_tgl <= !cap_tgl;
        end
        default: wstate <= W_IDLE;
      endcase
    end
  end

  assign fifo_wr = (wstate == W_WRITE) && !fifo_full;

  // GPIF rule: never strobe a write into the USB FIFO two cycles after it reported full
  a_gpif_full: assert property (@(posedge clk) disable iff (!rst_n)
                                !fx2_full_n |=> fx2_slwr_n || $past(fifo_rd));
endmodule
