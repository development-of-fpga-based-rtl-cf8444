// adc_model: testbench model of the beam, the BPM sum signal and the 12-bit
// ADC. The ring has H buckets, one per RF period T_PS; bucket b of the turn
// starting at the first rf_clk rising edge passes the BPM with a pulse whose
// peak is PEAK_PS after its RF edge. The pulse is modelled as a triangle of
// half-width W_PS and height amp[b] codes on top of a mid-scale baseline of
// 2048, so a sample taken d ps away from the peak reads
//     2048 + amp[b] * max(0, W_PS - |d|) / W_PS.
// One bucket (osc_bunch) can oscillate longitudinally: its arrival time is
// shifted by osc_amp_ps * sin(2 pi osc_hz t). The ADC samples on each rising
// edge of sample_clk, outputs the code LAT samples later as differential
// pairs right after that edge, and its data clock dco is the inverted sample
// clock, so the FPGA captures in the middle of the data eye.
`timescale 1ps/1ps
module adc_model #(
  parameter int  H       = 45,
  parameter int  T_PS    = 4902,
  parameter int  PEAK_PS = 3000,
  parameter int  W_PS    = 2000,
  parameter int  LAT     = 10
) (
  input  logic        rf_clk,
  input  logic        sample_clk,
  output logic [11:0] d_p,
  output logic [11:0] d_n,
  output logic        dco
);
  int  amp[H];
  int  osc_bunch = -1;
  real osc_amp_ps = 0.0, osc_hz = 0.0;
  longint t_ref = -1;
  logic [11:0] pipe[LAT];

  initial begin
    foreach (amp[i]) amp[i] = 0;
    foreach (pipe[i]) pipe[i] = 12'd2048;
    d_p = 12'd2048; d_n = ~12'd2048;
  end

  always @(posedge rf_clk) if (t_ref < 0) t_ref = $time;
  assign dco = ~sample_clk;

  // expected code for bucket b sampled ph ps after its RF edge, arrival shifted by s ps
  function automatic int code_of(input int b, input real ph, input real s);
    real d, v;
    d = ph - PEAK_PS - s;
    if (d < 0) d = -d;
    v = (d >= W_PS) ? 0.0 : amp[b] * (W_PS - d) / W_PS;
    return 2048 + int'($floor(v));
  endfunction

  always @(posedge sample_clk) begin
    longint t, n;
    int b, c;
    real s;
    if (t_ref >= 0) begin
      t = $time - t_ref;
      n = t / longint'(T_PS);
      b = int'(n % longint'(H));
      s = (b == osc_bunch) ? osc_amp_ps * $sin(2.0 * 3.14159265358979 * osc_hz * real'($time) * 1.0e-12) : 0.0;
      c = code_of(b, real'(t % longint'(T_PS)), s);
    end else c = 2048;
    d_p <= pipe[LAT-1];
    d_n <= ~pipe[LAT-1];
    for (int i = LAT-1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= 12'(c);
  end
endmodule
