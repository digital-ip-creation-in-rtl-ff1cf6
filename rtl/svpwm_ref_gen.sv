// svpwm_ref_gen: direct digital synthesis of the rotating reference vector.
//
// A PHASE_W-bit phase accumulator advances by PHASE_STEP every clock; its top
// six bits index a 64-point Q15 sine table. v_beta is the sine of the phase
// and v_alpha the cosine (the same table read 16 entries, a quarter period,
// ahead), so (v_alpha, v_beta) rotates counter-clockwise at
// f = PHASE_STEP * f_clk / 2^PHASE_W (about 50 Hz with the defaults at a
// 5 MHz clock). Both outputs are registered; after reset they start at
// angle 0 (v_alpha = 32767, v_beta = 0) on the first clock.
// The DDS structure, the 64-point Q15 table and the output names follow the
// source block diagram; the accumulator width and the frequency are this
// design's choices.
module svpwm_ref_gen
  import ip_tables_pkg::*;
#(
  parameter int          PHASE_W    = 32,
  parameter int unsigned PHASE_STEP = 42950
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic signed [15:0] v_alpha,
  output logic signed [15:0] v_beta
);

  logic [PHASE_W-1:0] phase;
  logic [5:0]         idx;

  assign idx = phase[PHASE_W-1 -: 6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      v_alpha <= '0;
      v_beta  <= '0;
    end else begin
      phase   <= phase + PHASE_W'(PHASE_STEP);
      v_beta  <= SINE_Q15[idx];
      v_alpha <= SINE_Q15[6'(idx + 6'd16)];
    end
  end

endmodule
