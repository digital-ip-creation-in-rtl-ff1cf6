// hbridge_router: gate steering for one H-bridge coil driver.
//
// The bridge has P-channel high-side switches (tl, tr: active low, 0 = on)
// and N-channel low-side switches (bl, br: active high, 1 = on). For positive
// polarity the left leg chops with the complementary pair (tl = ~pwm_h,
// bl = pwm_l) while br is held on, so current flows left to right during
// pwm_h and freewheels through both low sides during pwm_l. Negative polarity
// mirrors this onto the right leg. Dead time comes with pwm_h/pwm_l. The
// polarity is sampled only while pwm_h is low, so a leg never swaps roles
// while its high side conducts. enable low turns all four switches off.
// Gate polarities and the per-coil routing follow the source; the slow-decay
// chopping scheme and the polarity sampling are this design's choices.
module hbridge_router (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic pwm_h,
  input  logic pwm_l,
  input  logic pol,
  output logic tl,
  output logic tr,
  output logic bl,
  output logic br
);

  logic pol_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pol_q <= 1'b0;
    else if (!pwm_h) pol_q <= pol;
  end

  always_comb begin
    if (!enable) begin
      tl = 1'b1; tr = 1'b1; bl = 1'b0; br = 1'b0;
    end else if (!pol_q) begin
      tl = ~pwm_h; bl = pwm_l; tr = 1'b1; br = 1'b1;
    end else begin
      tr = ~pwm_h; br = pwm_l; tl = 1'b1; bl = 1'b1;
    end
  end

  // Never both switches of one leg on.
  a_left_leg:  assert property (@(posedge clk) disable iff (!rst_n) !(!tl && bl));
  a_right_leg: assert property (@(posedge clk) disable iff (!rst_n) !(!tr && br));

endmodule
