// bldc_drive_tb: closed-loop run of the BLDC speed drive at its default
// 1000-clock PWM period against a behavioural motor. The motor accelerates
// only while the gates energise the phase pair that matches its Hall state
// (so wrong commutation stalls it), its speed is fed back, and its angle
// produces the Hall sequence. Checks that the speed settles at the command,
// that the commutation never shorts a leg, and counts the mechanisms:
// throttle saturation, anti-windup clamp, commutation dead bands, a Hall
// fault (000 injected), and the fault_n kill; each must occur.
//
// 10 ns clock with reduced gain scaling (SHIFT, I_LIMIT) so that the loop
// settles in simulation time; everything else is at its default. The motor
// model is behavioural and is this testbench's own; the closed loop of PID,
// PWM and commutator follows the source.
module bldc_drive_tb;
  localparam int ILIM = 4194304;
  logic clk = 0, rst_n = 0, enable = 0, fault_n = 1;
  logic [15:0] sp, fb, throttle;
  logic [7:0] kp, ki, kd, dead;
  logic [2:0] hall, hall_force;
  logic force_en;
  logic ah, al, bh, bl, ch, cl, herr;
  real speed;
  longint angle;
  int sector;
  int checks = 0, failures = 0;
  int n_sat = 0, n_windup = 0, n_deadband = 0, n_herr = 0, n_fault = 0, n_hall_steps = 0;
  int SEQ [6] = '{1, 3, 2, 6, 4, 5};
  int HI  [6] = '{0, 0, 1, 1, 2, 2};
  int LO  [6] = '{1, 2, 2, 0, 0, 1};

  bldc_drive #(.SHIFT(12), .I_LIMIT(ILIM)) dut (
    .clk, .rst_n, .enable, .fault_n, .speed_sp (sp), .speed_fb (fb), .kp, .ki, .kd,
    .hall_state (hall), .dead_time (dead),
    .ah, .al, .bh, .bl, .ch, .cl, .hall_error (herr), .throttle);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign hall = force_en ? hall_force : 3'(SEQ[sector]);
  assign fb   = 16'($rtoi(speed));

  // motor: torque only from the correct phase pair
  always @(posedge clk) begin
    logic [2:0] hs, ls;
    real drive;
    hs = {ch, bh, ah}; ls = {cl, bl, al};
    drive = (hs == 3'(1 << HI[sector]) && ls == 3'(1 << LO[sector])) ? 1.0 : 0.0;
    speed <= speed + (20000.0 * drive - speed) / 4096.0;
    if ((ah && al) || (bh && bl) || (ch && cl)) begin failures++; $display("FAIL: shoot-through"); end
    if (throttle == 16'd1000) n_sat++;
    if (dut.u_pid.integ == ILIM) n_windup++;
    if (herr) n_herr++;
    if (rst_n && enable && !force_en && !herr && hs == 0 && ls == 0 && fault_n) n_deadband++;
    angle = angle + longint'($rtoi(speed));
    if (angle >= 64'd20000000) begin
      angle = angle - 64'd20000000;
      sector <= (sector + 1) % 6;
      n_hall_steps++;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the speed carries PWM ripple: judge its mean over ten PWM periods
  task automatic settle(input int target, input int clocks);
    int err;
    longint acc;
    sp = 16'(target);
    repeat (clocks - 10000) @(posedge clk);
    acc = 0;
    repeat (10000) begin @(posedge clk); acc += longint'(fb); end
    err = int'(acc / 10000) - target;
    check(err >= -target / 50 && err <= target / 50, $sformatf("mean speed %0d for command %0d", err + target, target));
  endtask

  initial begin
    speed = 0.0; angle = 0; sector = 0; force_en = 0; hall_force = 0;
    kp = 255; ki = 1; kd = 0; dead = 8'd20; sp = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    enable = 1;
    settle(10000, 250000);
    settle(6000, 250000);
    // Hall fault: sensors read 000
    @(negedge clk); hall_force = 3'b000; force_en = 1;
    repeat (5) @(posedge clk); #1;
    check(herr && {ah, al, bh, bl, ch, cl} == '0, "hall 000: fault flagged and gates off");
    repeat (200) @(posedge clk);
    @(negedge clk) force_en = 0;
    settle(6000, 150000);
    // external fault kill
    @(negedge clk) fault_n = 0; #1;
    check({ah, al, bh, bl, ch, cl} == '0, "fault_n removes every gate");
    n_fault++;
    repeat (100) @(posedge clk);
    @(negedge clk) fault_n = 1;
    check(n_sat > 0, "throttle saturation happened");
    check(n_windup > 0, "anti-windup clamp happened");
    check(n_deadband > 0, "commutation dead band happened");
    check(n_herr > 0, "hall fault happened");
    check(n_hall_steps > 60, $sformatf("motor turned (%0d hall steps)", n_hall_steps));
    $display("sat %0d windup %0d deadband %0d herr %0d steps %0d", n_sat, n_windup, n_deadband, n_herr, n_hall_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
