// bxb_pkg: constants and types shared by the bunch-by-bunch beam current
// monitor. The machine numbers (harmonic number 45, FIFO depth 65536, 12-bit
// ADC, 10-bit phase tap of 10 ps) come from the storage ring and the monitor
// as described; the SPI register map and frame layout are this design's own.
`timescale 1ps/1ps
package bxb_pkg;
  // Storage ring and acquisition sizes
  localparam int unsigned HARMONIC   = 45;     // RF buckets per turn
  localparam int unsigned FIFO_DEPTH = 65536;  // samples in one snapshot
  localparam int unsigned ADC_BITS   = 12;     // ADC resolution
  localparam int unsigned TAP_BITS   = 10;     // phase tap 0..1023
  localparam int unsigned TAP_PS     = 10;     // delay per tap in ps
  localparam int unsigned USB_BITS   = 16;     // GPIF data bus width

  // SPI frame: {rw, addr[2:0], data[11:0]}, MSB first, 16 bits
  localparam int unsigned SPI_FRAME  = 16;
  localparam int unsigned SPI_ADDR_W = 3;
  localparam int unsigned SPI_DATA_W = 12;

  typedef enum logic [SPI_ADDR_W-1:0] {
    REG_CTRL    = 3'd0,  // write bit0 = 1: arm one capture (self clearing)
    REG_TAP     = 3'd1,  // requested phase tap [9:0], read back
    REG_STATUS  = 3'd2,  // read only: {.., ps_busy, done, reading, capturing}
    REG_CUR_TAP = 3'd3   // read only: tap the DCM is at now
  } spi_reg_e;

  // Status bits reported by the FIFO controller
  typedef struct packed {
    logic ps_busy;    // phase shifter still stepping
    logic done;       // last snapshot fully sent to USB
    logic reading;    // draining the FIFO to USB
    logic capturing;  // armed or writing samples
  } status_t;
endpackage
