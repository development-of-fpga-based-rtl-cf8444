// tb_spi_regs: SPI register block. Writes the tap register and reads it
// back, reads STATUS and CUR_TAP while the testbench drives known values on
// those inputs, writes CTRL with bit0 set (must give exactly one arm pulse)
// and with bit0 clear (none), and checks that writes to read-only addresses
// change nothing.
`timescale 1ps/1ps
module tb_spi_regs;
  import bxb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sclk, cs_n, mosi, miso, arm;
  logic [9:0] target_tap, cur_tap;
  status_t status;
  logic [11:0] rd;
  int checks = 0, failures = 0, n_arm = 0;

  spi_regs #(.TAP_W(10)) dut (.clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .arm,
                              .target_tap, .status, .cur_tap);
  spi_master #(.HALF(100000)) m (.sclk, .cs_n, .mosi, .miso);

  always #10417 clk = ~clk;
  always @(posedge clk) if (arm) n_arm++;

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0h want %0h", what, got, want); end
  endtask

  initial begin
    status = '0; cur_tap = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    expect_eq("tap after reset", target_tap, 0);
    for (int i = 0; i < 6; i++) begin
      int v;
      v = (i == 0) ? 1023 : (i == 1) ? 0 : int'($urandom % 1024);
      m.xfer(1'b0, REG_TAP, 12'(v), rd);
      expect_eq("tap written", target_tap, v);
      m.xfer(1'b1, REG_TAP, 12'h0, rd);
      expect_eq("tap read back", rd, v);
      cur_tap = 10'($urandom);
      status = status_t'(4'($urandom));
      m.xfer(1'b1, REG_CUR_TAP, 12'hfff, rd);
      expect_eq("cur_tap read", rd, cur_tap);
      m.xfer(1'b1, REG_STATUS, 12'h0, rd);
      expect_eq("status read", rd, status);
    end
    m.xfer(1'b0, REG_CTRL, 12'h001, rd);
    repeat (4) @(posedge clk);
    expect_eq("arm pulses", n_arm, 1);
    m.xfer(1'b0, REG_CTRL, 12'h000, rd);
    m.xfer(1'b0, REG_STATUS, 12'hfff, rd);
    repeat (4) @(posedge clk);
    expect_eq("no extra arm", n_arm, 1);
    m.xfer(1'b0, REG_TAP, 12'd77, rd);
    m.xfer(1'b0, REG_CUR_TAP, 12'd5, rd);
    expect_eq("read-only write ignored", target_tap, 77);
    m.xfer(1'b0, REG_CTRL, 12'h001, rd);
    repeat (4) @(posedge clk);
    expect_eq("second arm", n_arm, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
