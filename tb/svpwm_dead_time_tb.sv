// svpwm_dead_time_tb: random ideal PWM on three phases. A gate must be on
// exactly when the last DEAD+1 sampled ideal values agree with it (reference
// shift register), the two gates of a leg never overlap, and each ideal
// edge between long pulses gives exactly DEAD clocks with both gates off.
//
// 10 ns clock, random ideal PWM streams. The dead band of DEAD = 3 clocks
// follows the source (600 ns at 5 MHz).
module svpwm_dead_time_tb;
  localparam int DEAD = 3;
  logic clk = 0, rst_n = 0;
  logic [2:0] pwm, high, low;
  logic [DEAD:0] hist [3];
  int checks = 0, failures = 0, both_off_runs = 0;
  int off_len [3];

  svpwm_dead_time #(.DEAD(DEAD)) dut (.clk, .rst_n, .pwm, .high, .low);

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
    int len [3];
    pwm = 0;
    for (int p = 0; p < 3; p++) begin hist[p] = '0; len[p] = 5; off_len[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(posedge clk);
      for (int p = 0; p < 3; p++) hist[p] = {hist[p][DEAD-1:0], pwm[p]};
      #1;
      if (n > DEAD + 2)
        for (int p = 0; p < 3; p++) begin
          check(high[p] == (&hist[p]), $sformatf("phase %0d high gate at %0d", p, n));
          check(low[p]  == ~(|hist[p]), $sformatf("phase %0d low gate at %0d", p, n));
          check(!(high[p] && low[p]), "no overlap");
          if (!high[p] && !low[p]) begin if (n > 50) off_len[p]++; end
          else begin
            if (off_len[p] != 0 && n > 60) begin
              check(off_len[p] == DEAD, $sformatf("dead band %0d clocks", off_len[p]));
              both_off_runs++;
            end
            off_len[p] = 0;
          end
        end
      // new ideal value: runs of at least DEAD+2 clocks so every dead band is whole
      for (int p = 0; p < 3; p++) begin
        len[p]--;
        if (len[p] == 0) begin pwm[p] = ~pwm[p]; len[p] = int'($urandom_range(DEAD + 2, 20)); end
      end
    end
    check(both_off_runs > 100, "dead bands exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
