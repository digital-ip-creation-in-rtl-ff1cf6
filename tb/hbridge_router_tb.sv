// hbridge_router_tb: random complementary PWM, polarity and enable. The four
// gates are compared with a reference model of the slow-decay steering
// (polarity taken only while pwm_h is low), and no leg may ever have its
// P-channel top (active low) and N-channel bottom (active high) both on.
//
// 10 ns clock, random stimulus. The four-gate drive pattern with active-low
// top switches follows the source's bridge wiring; the rule that polarity
// only changes while the high-side PWM is off is this design's choice and is
// checked as such.
module hbridge_router_tb;
  logic clk = 0, rst_n = 0, enable = 0, pwm_h = 0, pwm_l = 0, pol = 0;
  logic tl, tr, bl, br;
  logic pol_m;
  int checks = 0, failures = 0;
  int seen [4];

  hbridge_router dut (.clk, .rst_n, .enable, .pwm_h, .pwm_l, .pol, .tl, .tr, .bl, .br);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic etl, etr, ebl, ebr;
    int st;
    pol_m = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      st = int'($urandom_range(0, 2));     // 0: dead band, 1: high, 2: low
      pwm_h = (st == 1); pwm_l = (st == 2);
      if ($urandom_range(0, 9) == 0) pol = ~pol;
      enable = ($urandom_range(0, 19) != 0);
      #1;
      if (!enable)     begin etl = 1; etr = 1; ebl = 0; ebr = 0; end
      else if (!pol_m) begin etl = ~pwm_h; ebl = pwm_l; etr = 1; ebr = 1; end
      else             begin etr = ~pwm_h; ebr = pwm_l; etl = 1; ebl = 1; end
      check({tl, tr, bl, br} == {etl, etr, ebl, ebr},
            $sformatf("gates %b expected %b (en %b h %b l %b pol %b)", {tl, tr, bl, br}, {etl, etr, ebl, ebr}, enable, pwm_h, pwm_l, pol_m));
      check(!(!tl && bl) && !(!tr && br), "leg never shorted");
      if (enable && pwm_h) seen[pol_m ? 1 : 0]++;
      if (enable && pwm_l) seen[pol_m ? 3 : 2]++;
      @(posedge clk);
      if (!pwm_h) pol_m = pol;
    end
    for (int k = 0; k < 4; k++) check(seen[k] > 50, "all drive cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
