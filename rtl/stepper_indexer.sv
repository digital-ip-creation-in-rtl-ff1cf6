// stepper_indexer: microstepping indexer for a two-phase stepper motor.
//
// An 8-bit phase accumulator holds the electrical angle in 256 microsteps
// per electrical cycle. Each rising edge of step (synchronised to clk by two
// flip-flops) moves it, up when dir is 1 and down when dir is 0, by a step
// size chosen with step_mode: 0 one microstep (1/256 cycle), 1 a half step
// (32 microsteps, 45 degrees), 2 or 3 a full step (64 microsteps, 90
// degrees). From the reset phase 0, full steps energise one coil at a time
// and half steps alternate one and two coils. enable low freezes it. The angle addresses a quarter-wave sine table:
// coil A gets |sin|, coil B gets |cos| (the same table a quarter cycle
// ahead), each as an 8-bit duty magnitude plus a polarity bit (1 = current
// reversed), so the two coil currents stay 90 degrees apart. Outputs are
// registered and change on the clock after the accumulator moves.
// The 8-bit accumulator, the step/direction interface and the sine/cosine
// look-up follow the source block diagram, and the full-step and half-step
// configurations selected by control pins follow its text; which coil takes
// the sine, the step_mode encoding and the table's 8-bit resolution are this
// design's choices.
module stepper_indexer
  import ip_tables_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       step,
  input  logic       dir,
  input  logic [1:0] step_mode,
  output logic [7:0] phase,
  output logic [7:0] duty_a,
  output logic       pol_a,
  output logic [7:0] duty_b,
  output logic       pol_b
);

  logic [2:0] step_sync;
  logic       step_rise;
  logic [7:0] phase_b;
  logic [7:0] step_size;

  function automatic logic [7:0] sin_mag(input logic [6:0] p);
    return p[6] ? QSIN_U8[7'd64 - {1'b0, p[5:0]}] : QSIN_U8[{1'b0, p[5:0]}];
  endfunction

  assign step_rise = step_sync[1] & ~step_sync[2];
  assign phase_b   = phase + 8'd64;
  assign step_size = (step_mode == 2'd0) ? 8'd1 : (step_mode == 2'd1) ? 8'd32 : 8'd64;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_sync <= '0;
      phase     <= '0;
      duty_a    <= '0;
      pol_a     <= 1'b0;
      duty_b    <= '0;
      pol_b     <= 1'b0;
    end else begin
      step_sync <= {step_sync[1:0], step};
      if (enable && step_rise)
        phase <= dir ? phase + step_size : phase - step_size;
      duty_a <= sin_mag(phase[6:0]);
      pol_a  <= phase[7];
      duty_b <= sin_mag(phase_b[6:0]);
      pol_b  <= phase_b[7];
    end
  end

endmodule
