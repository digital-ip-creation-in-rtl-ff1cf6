// bldc_commutator: six-step commutation of a BLDC motor from Hall sensors.
//
// The three Hall inputs are synchronised by two flip-flops. Each valid state
// selects one phase whose high-side switch chops with the PWM input and one
// phase whose low-side switch stays on for the whole sector (unipolar PWM);
// the third phase floats. Forward rotation steps through
//   hall 001: A+ B-   011: A+ C-   010: B+ C-   110: B+ A-   100: C+ A-   101: C+ B-
// After every change of Hall state all six gates stay off for dead_time+1
// clocks (the change detector adds one) before the new pair turns on, so no leg can conduct through both
// switches during a commutation. The states 000 and 111 cannot come from
// working sensors: they raise hall_error and turn every gate off. enable low
// or fault_n low (combinational) also turns every gate off. A new Hall
// state reaches the gates three clocks after it appears on hall_state.
// The Hall decoding, the invalid-state fault, the chopped high side with a
// continuously-on low side and the dead-time logic follow the source; the
// particular Hall-to-phase table is this design's choice.
module bldc_commutator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       fault_n,
  input  logic [2:0] hall_state,
  input  logic       pwm,
  input  logic [7:0] dead_time,
  output logic       ah,
  output logic       al,
  output logic       bh,
  output logic       bl,
  output logic       ch,
  output logic       cl,
  output logic       hall_error
);

  typedef enum logic [1:0] {PH_A = 2'd0, PH_B = 2'd1, PH_C = 2'd2, PH_NONE = 2'd3} phase_e;

  logic [2:0] hall_s1, hall_s2, hall_prev;
  logic [7:0] dead_cnt;
  phase_e     hi_ph, lo_ph;
  logic       valid, active;

  always_comb begin
    valid = 1'b1;
    case (hall_s2)
      3'b001:  begin hi_ph = PH_A; lo_ph = PH_B; end
      3'b011:  begin hi_ph = PH_A; lo_ph = PH_C; end
      3'b010:  begin hi_ph = PH_B; lo_ph = PH_C; end
      3'b110:  begin hi_ph = PH_B; lo_ph = PH_A; end
      3'b100:  begin hi_ph = PH_C; lo_ph = PH_A; end
      3'b101:  begin hi_ph = PH_C; lo_ph = PH_B; end
      default: begin hi_ph = PH_NONE; lo_ph = PH_NONE; valid = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hall_s1    <= '0;
      hall_s2    <= '0;
      hall_prev  <= '0;
      dead_cnt   <= '0;
      hall_error <= 1'b0;
    end else begin
      hall_s1    <= hall_state;
      hall_s2    <= hall_s1;
      hall_prev  <= hall_s2;
      hall_error <= ~valid;
      if (hall_s2 != hall_prev)       dead_cnt <= '0;
      else if (dead_cnt != 8'hFF)     dead_cnt <= dead_cnt + 1'b1;
    end
  end

  assign active = enable & fault_n & valid & (hall_s2 == hall_prev) & (dead_cnt >= dead_time);

  assign ah = active & pwm & (hi_ph == PH_A);
  assign bh = active & pwm & (hi_ph == PH_B);
  assign ch = active & pwm & (hi_ph == PH_C);
  assign al = active & (lo_ph == PH_A);
  assign bl = active & (lo_ph == PH_B);
  assign cl = active & (lo_ph == PH_C);

  a_leg_a: assert property (@(posedge clk) disable iff (!rst_n) !(ah && al));
  a_leg_b: assert property (@(posedge clk) disable iff (!rst_n) !(bh && bl));
  a_leg_c: assert property (@(posedge clk) disable iff (!rst_n) !(ch && cl));

endmodule
