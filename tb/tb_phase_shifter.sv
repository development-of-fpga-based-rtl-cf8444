// tb_phase_shifter: the phase shifter against a simple stand-in for the DCM
// phase-shift port written here (PSDONE a fixed number of cycles after each
// PSEN, position counted in the testbench). For a series of targets (up to
// 1023, down, to 0) it checks that the DCM ends at the target, that exactly
// |target - start| steps were issued in the right direction, that cur_tap
// and busy report it, and that each step takes LAT + 4 cycles (PSEN
// register, stand-in sees PSEN, LAT cycles, PSDONE, back to idle).
`timescale 1ps/1ps
module tb_phase_shifter;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 0;
  logic [9:0] target_tap = 0, cur_tap;
  logic busy, ps_en, ps_incdec, ps_done = 0;
  int checks = 0, failures = 0;
  int dcm_pos = 0, n_inc = 0, n_dec = 0, cnt = -1;
  logic dir;

  phase_shifter #(.TAP_BITS(10)) dut (.clk, .rst_n, .target_tap, .cur_tap, .busy,
                                      .ps_en, .ps_incdec, .ps_done);
  always #10000 clk = ~clk;

  // DCM stand-in
  always @(posedge clk) begin
    ps_done <= 0;
    if (!rst_n) cnt <= -1;
    else if (ps_en) begin
      if (cnt >= 0) begin failures++; $display("PSEN while a step is pending"); end
      cnt <= LAT; dir <= ps_incdec;
      if (ps_incdec) n_inc++; else n_dec++;
    end else if (cnt > 0) cnt <= cnt - 1;
    else if (cnt == 0) begin
      ps_done <= 1; cnt <= -1;
      dcm_pos <= dir ? dcm_pos + 1 : dcm_pos - 1;
    end
  end

  task automatic go(input int tgt);
    int start, cycles, i0, d0;
    start = dcm_pos; i0 = n_inc; d0 = n_dec;
    @(negedge clk) target_tap = 10'(tgt);
    cycles = 0;
    @(negedge clk);
    checks++;
    if (tgt != start && !busy) begin failures++; $display("busy low with work to do"); end
    while (busy && cycles < 100000) begin @(negedge clk); cycles++; end
    checks++;
    if (dcm_pos != tgt || cur_tap != 10'(tgt)) begin
      failures++; $display("target %0d: dcm at %0d, cur_tap %0d", tgt, dcm_pos, cur_tap);
    end
    checks++;
    if ((tgt > start && (n_inc - i0 != tgt - start || n_dec != d0)) ||
        (tgt < start && (n_dec - d0 != start - tgt || n_inc != i0))) begin
      failures++; $display("target %0d: %0d inc, %0d dec steps", tgt, n_inc - i0, n_dec - d0);
    end
    checks++;
    if (tgt != start && (cycles + 1) != (tgt > start ? tgt - start : start - tgt) * (LAT + 4)) begin
      failures++; $display("target %0d: took %0d cycles", tgt, cycles + 1);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    go(5); go(1023); go(1000); go(300); go(0); go(0);
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
