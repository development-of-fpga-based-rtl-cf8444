// tb_freq_divider: checks the divide-by-45 turn marker. A reference counter
// started at reset release predicts bunch_no in every cycle; SYN must be high
// exactly when that counter is 0, i.e. once every 45 RF cycles. The first
// check comes one RF edge after reset release, when the count is 1.
`timescale 1ps/1ps
module tb_freq_divider;
  localparam int DIV = 45;
  logic rf_clk = 0, rst_n = 0, syn;
  logic [5:0] bunch_no;
  int checks = 0, failures = 0, ref_cnt = 1, last_syn = -1, n_syn = 0, cyc = 0;

  freq_divider #(.DIV(DIV)) dut (.rf_clk, .rst_n, .syn, .bunch_no);

  always #2451 rf_clk = ~rf_clk;

  initial begin
    repeat (3) @(posedge rf_clk);
    @(negedge rf_clk) rst_n = 1;
    repeat (20 * DIV) begin
      @(negedge rf_clk);
      cyc++;
      checks++;
      if (bunch_no != 6'(ref_cnt) || syn != (ref_cnt == 0)) begin
        failures++;
        $display("mismatch cycle %0d: bunch_no=%0d ref=%0d syn=%0b", cyc, bunch_no, ref_cnt, syn);
      end
      if (syn) begin
        if (last_syn >= 0) begin
          checks++;
          if (cyc - last_syn != DIV) begin failures++; $display("SYN period %0d", cyc - last_syn); end
        end
        last_syn = cyc; n_syn++;
      end
      ref_cnt = (ref_cnt + 1) % DIV;
    end
    checks++;
    if (n_syn != 20) begin failures++; $display("SYN count %0d", n_syn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
