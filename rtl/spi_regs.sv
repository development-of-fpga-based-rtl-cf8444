// spi_regs: SPI slave through which the host sets up the monitor: it arms a
// capture and sets the phase tap of the ADC sample clock, and reads back the
// status and the tap in force. The document shows an SPI port shared by the
// FIFO controller and the phase shifter but gives no frame or register map;
// both are this design's own.
// Frame (SPI mode 0, MSB first, cs_n low for 16 sclk rising edges):
//   bit 15 rw (1 = read), bits 14:12 address, bits 11:0 data.
// On a write the register is updated when the 16th bit arrives. On a read the
// register is loaded after the 4th bit and shifted out on miso from the next
// falling sclk edge, bit 11 first. Registers (bxb_pkg::spi_reg_e):
//   0 CTRL    write bit0=1 gives a one-cycle arm pulse
//   1 TAP     requested phase tap, read/write, 0 after reset
//   2 STATUS  read only, {8'b0, status_t}
//   3 CUR_TAP read only, tap reached by the phase shifter
// The SPI lines are sampled with clk through two-flop synchronizers, so sclk
// must be slower than clk/4. miso is 0 when the slave is not selected.
`timescale 1ps/1ps
module spi_regs
  import bxb_pkg::*;
#(
  parameter int unsigned TAP_W = bxb_pkg::TAP_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sclk,
  input  logic             cs_n,
  input  logic             mosi,
  output logic             miso,
  output logic             arm,        // one-cycle pulse
  output logic [TAP_W-1:0] target_tap,
  input  status_t          status,
  input  logic [TAP_W-1:0] cur_tap
);
  logic sclk_s, cs_n_s, mosi_s, sclk_d;
  sync_bit u_sclk (.clk(clk), .rst_n(rst_n), .d(sclk), .q(sclk_s));
  sync_bit #(.RESET_VAL(1'b1)) u_cs (.clk(clk), .rst_n(rst_n), .d(cs_n), .q(cs_n_s));
  sync_bit u_mosi (.clk(clk), .rst_n(rst_n), .d(mosi), .q(mosi_s));

  logic rise, fall;
  assign rise = !cs_n_s &&  sclk_s && !sclk_d;
  assign fall = !cs_n_s && !sclk_s &&  sclk_d;

  logic [4:0]              nbits;
  logic [SPI_FRAME-2:0]    shift_in;   // first 15 bits of the frame
  logic [SPI_DATA_W-1:0]   shift_out;
  logic                    is_read;

  function automatic logic [SPI_DATA_W-1:0] reg_value(input logic [SPI_ADDR_W-1:0] a);
    unique case (a)
      REG_TAP:     return SPI_DATA_W'(target_tap);
      REG_STATUS:  return SPI_DATA_W'(status);
      REG_CUR_TAP: return SPI_DATA_W'(cur_tap);
      default:     return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_d     <= 1'b0;
      nbits      <= '0;
      shift_in   <= '0;
      shift_out  <= '0;
      is_read    <= 1'b0;
      miso       <= 1'b0;
      arm        <= 1'b0;
      target_tap <= '0;
    end else begin
      sclk_d <= sclk_s;
      arm    <= 1'b0;
      if (cs_n_s) begin
        nbits <= '0;
        miso  <= 1'b0;
      end else begin
        if (rise) begin
          nbits    <= nbits + 1'b1;
          shift_in <= {shift_in[SPI_FRAME-3:0], mosi_s};
          if (nbits == 5'd3) begin
            // {rw, addr} complete: shift_in[2:0] holds rw,a2,a1; mosi_s is a0
            is_read   <= shift_in[2];
            shift_out <= reg_value({shift_in[1:0], mosi_s});
          end
          if (nbits == 5'(SPI_FRAME - 1) && !shift_in[SPI_FRAME-2]) begin
            // 16th bit of a write frame
            unique case (spi_reg_e'(shift_in[SPI_FRAME-3 -: SPI_ADDR_W]))
              REG_CTRL: arm        <= mosi_s;   // data bit0
              REG_TAP:  target_tap <= {shift_in[TAP_W-2:0], mosi_s};
              default: ;
            endcase
          end
        end
        if (fall && is_read && nbits >= 5'd4 && nbits < 5'(SPI_FRAME)) begin
          miso      <= shift_out[SPI_DATA_W-1];
          shift_out <= {shift_out[SPI_DATA_W-2:0], 1'b0};
        end
      end
    end
  end
endmodule
