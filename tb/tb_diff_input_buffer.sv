// tb_diff_input_buffer: drives the 12 ADC data pairs with random codes as
// proper differential signals and checks that each code is received; then
// drives both lines of every pair equal and checks that the last code holds.
`timescale 1ps/1ps
module tb_diff_input_buffer;
  logic [11:0] in_p, in_n, out, code, held;
  int checks = 0, failures = 0;

  diff_input_buffer #(.WIDTH(12)) dut (.in_p, .in_n, .out);

  initial begin
    for (int i = 0; i < 200; i++) begin
      code = 12'($urandom);
      in_p = code; in_n = ~code;
      #100;
      checks++;
      if (out != code) begin failures++; $display("got %h want %h", out, code); end
      if (i % 10 == 9) begin
        held = code;
        in_p = 12'($urandom); in_n = in_p;   // no differential voltage
        #100;
        checks++;
        if (out != held) begin failures++; $display("hold: got %h want %h", out, held); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
