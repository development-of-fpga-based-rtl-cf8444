// phase_shifter: moves the fine phase shift of the clock manager (DCM) that
// makes the ADC sample clock, so that the ADC samples the sum signal of the
// BPM at its peak. The requested delay is a tap number 0..1023 of 10 ps each,
// as in the document; the step protocol (one PSEN pulse per tap, PSINCDEC for
// the direction, PSDONE when the step has been made) is the dynamic phase
// shift port of the Virtex-4 DCM and is this design's reading of "delay lines
// inside the clock lines".
// How it works: cur_tap mirrors the DCM's position (0 after reset). While it
// differs from target_tap the FSM issues one step toward it and waits for
// ps_done before counting the step and issuing the next one.
// Timing: ps_en is a one-cycle pulse; a step takes 2 clk cycles plus the DCM's
// PSDONE latency. busy is high from the cycle the target differs until
// cur_tap equals it.
`timescale 1ps/1ps
module phase_shifter #(
  parameter int unsigned TAP_BITS = bxb_pkg::TAP_BITS
) (
  input  logic                clk,        // DCM PSCLK
  input  logic                rst_n,
  input  logic [TAP_BITS-1:0] target_tap,
  output logic [TAP_BITS-1:0] cur_tap,
  output logic                busy,
  // DCM dynamic phase shift port
  output logic                ps_en,
  output logic                ps_incdec,  // 1: increase delay
  input  logic                ps_done
);
  typedef enum logic [0:0] {PS_IDLE, PS_WAIT} ps_state_e;
  ps_state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= PS_IDLE;
      cur_tap   <= '0;
      ps_en     <= 1'b0;
      ps_incdec <= 1'b0;
    end else begin
      ps_en <= 1'b0;
      unique case (state)
        PS_IDLE: if (target_tap != cur_tap) begin
          ps_en     <= 1'b1;
          ps_incdec <= (target_tap > cur_tap);
          state     <= PS_WAIT;
        end
        PS_WAIT: if (ps_done) begin
          cur_tap <= ps_incdec ? cur_tap + 1'b1 : cur_tap - 1'b1;
          state   <= PS_IDLE;
        end
        default: state <= PS_IDLE;
      endcase
    end
  end

  assign busy = (state == PS_WAIT) || (target_tap != cur_tap);

  // PSEN is a single-cycle pulse, and no new step starts before PSDONE
  a_one_step: assert property (@(posedge clk) disable iff (!rst_n) ps_en |=> !ps_en);
endmodule
