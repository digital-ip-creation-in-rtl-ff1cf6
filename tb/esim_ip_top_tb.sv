// esim_ip_top_tb: end-to-end test of the whole IP collection at its default
// parameters (no parameter overrides on the top, so it also serves as the
// full-size test). One thread per core runs concurrently; each makes the
// core's characteristic mechanisms happen and counts them:
//   PWM: dead band before every turn-on, fault shutdown, never both gates on.
//   Soft start: ramp rate (one count per ramp_rate_delay+1 clocks) and PDM
//   density; stand-alone modulator density.
//   SVPWM: one full 50 Hz electrical turn visits all six sectors in order,
//   dead band on every phase edge, never both gates of a leg on.
//   Stepper: STEP pulses advance the microstep phase (micro, half and full
//   step sizes), H-bridges never shoot
//   through, fault shutdown turns every low side off.
//   BLDC: Hall rotation gives the commutation table, dead band after each
//   Hall change, illegal Hall codes raise hall_error, throttle saturates.
//   PID release: RC plant settles to the setpoint.
//   QEI: 4x counting both ways, wrap at max_count, index clear.
//   Watchdog: fed inside window, early warning, starvation reset, then
//   (re-armed each time) early clear, late clear and wrong key.
//   I2C: write and read to a behavioural slave with clock stretching.
//
// Interface: drives every port of the top. Timing: clk 10 MHz, sv_clk 5 MHz,
// about 22 ms of simulated time. The mechanisms checked are those the source
// describes for each core; the stimulus values are this testbench's choice.
module esim_ip_top_tb;
  logic clk = 0, sv_clk = 0, rst_n = 0;
  always #50  clk    = ~clk;     // 10 MHz system clock
  always #100 sv_clk = ~sv_clk;  // 5 MHz SVPWM clock

  logic pwm_enable = 0, pwm_fault_n = 1, pwm_h, pwm_l;
  logic [15:0] pwm_period = 16'd99, pwm_duty_cycle = 16'd30;
  logic [7:0] pwm_dead_time = 8'd5;
  logic [7:0] ss_target_duty = 0, ss_ramp_rate_delay = 8'd3, ss_safe_duty;
  logic ss_pdm_out;
  logic [7:0] sd_in = 8'd64;
  logic sd_out;
  logic sv_u_high, sv_u_low, sv_v_high, sv_v_low, sv_w_high, sv_w_low;
  logic [15:0] sv_v_alpha, sv_v_beta;
  logic [2:0] sv_sector;
  logic st_enable = 0, st_fault_n = 1, st_step = 0, st_dir = 1;
  logic [1:0] st_step_mode = 2'd0;
  logic [3:0] st_a_gates, st_b_gates;
  logic [7:0] st_phase;
  logic bldc_enable = 0, bldc_fault_n = 1;
  logic [15:0] bldc_speed_sp = 16'd1000, bldc_speed_fb = 16'd0, bldc_throttle;
  logic [7:0] bldc_kp = 8'd50, bldc_ki = 8'd1, bldc_kd = 8'd0, bldc_dead_time = 8'd10;
  logic [2:0] bldc_hall_state = 3'b001;
  logic [5:0] bldc_gates;
  logic bldc_hall_error;
  logic pid_enable = 0;
  logic [7:0] pid_sp = 8'd0, pid_fb, pid_out;
  logic qei_enable = 1, qei_phase_a = 0, qei_phase_b = 0, qei_index = 0, qei_direction, qei_error;
  logic [15:0] qei_max_count = 16'd399, qei_position;
  logic wd_enable = 0, wd_feed = 0, wd_ewi, wd_reset;
  logic [7:0] wd_key = 8'hA5, wd_window_open = 8'd40, wd_window_close = 8'd120, wd_timeout = 8'd160, wd_count;
  logic [2:0] wd_cause;
  logic i2c_start = 0, i2c_rw = 0, i2c_busy, i2c_done, i2c_ack_error, i2c_scl_oe, i2c_sda_oe;
  logic [6:0] i2c_addr = 7'h50;
  logic [7:0] i2c_tx_data = 0, i2c_rx_data;
  logic s_scl_oe, s_sda_oe, s_nacked;
  logic [7:0] s_written, s_addr_byte;
  int s_nw, s_nr, s_nst;
  wire i2c_scl = ~(i2c_scl_oe | s_scl_oe);
  wire i2c_sda = ~(i2c_sda_oe | s_sda_oe);

  esim_ip_top dut (.*, .i2c_scl_i (i2c_scl), .i2c_sda_i (i2c_sda));

  i2c_slave_model #(.ADDR(7'h50), .STRETCH(4000)) slave (
    .scl (i2c_scl), .sda (i2c_sda), .scl_oe (s_scl_oe), .sda_oe (s_sda_oe),
    .read_value (8'h3C), .written (s_written), .last_addr_byte (s_addr_byte),
    .master_nacked (s_nacked), .n_write (s_nw), .n_read (s_nr), .n_stretch (s_nst));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_pwm_dead = 0, n_pwm_fault = 0, n_sv_sector_steps = 0, n_sv_dead = 0;
  int n_st_steps = 0, n_st_fault = 0, n_st_modes = 0, n_bldc_comm = 0, n_bldc_dead = 0, n_bldc_err = 0;
  int n_bldc_sat = 0, n_qei_wrap = 0, n_qei_index = 0, n_wd_ewi = 0, n_wd_fault = 0;
  int n_i2c_stretch = 0, n_ss_ramp = 0, n_pid_settle = 0;

  // ---------------- continuous safety monitors ----------------
  logic ph_q = 0, pl_q = 0;
  int pwm_off_run = 0;
  always @(posedge clk) if (rst_n) begin
    check(!(pwm_h && pwm_l), "PWM both gates on");
    if (!pwm_h && !pwm_l) pwm_off_run++;
    else begin
      if (pwm_enable && pwm_fault_n && ((pwm_h && !ph_q) || (pwm_l && !pl_q))) begin
        check(pwm_off_run >= 5, $sformatf("PWM dead band %0d", pwm_off_run));
        n_pwm_dead++;
      end
      pwm_off_run = 0;
    end
    ph_q = pwm_h; pl_q = pwm_l;
  end

  logic [5:0] sv_q = 0;
  int sv_off [3] = '{0, 0, 0};
  always @(posedge sv_clk) if (rst_n) begin
    logic [5:0] g;
    g = {sv_u_high, sv_u_low, sv_v_high, sv_v_low, sv_w_high, sv_w_low};
    for (int p = 0; p < 3; p++) begin
      check(!(g[5-2*p] && g[4-2*p]), "SVPWM leg shoot-through");
      if (!g[5-2*p] && !g[4-2*p]) sv_off[p]++;
      else begin
        if ((g[5-2*p] && !sv_q[5-2*p]) || (g[4-2*p] && !sv_q[4-2*p])) begin
          check(sv_off[p] >= 3, $sformatf("SVPWM dead band %0d", sv_off[p]));
          n_sv_dead++;
        end
        sv_off[p] = 0;
      end
    end
    sv_q = g;
  end

  // H-bridge: {tl, tr, bl, br}, tl/tr active low
  always @(posedge clk) if (rst_n) begin
    check(!(!st_a_gates[3] && st_a_gates[1]) && !(!st_a_gates[2] && st_a_gates[0]), "bridge A shoot-through");
    check(!(!st_b_gates[3] && st_b_gates[1]) && !(!st_b_gates[2] && st_b_gates[0]), "bridge B shoot-through");
  end

  always @(posedge clk) if (rst_n) begin
    check(!(bldc_gates[5] && bldc_gates[4]) && !(bldc_gates[3] && bldc_gates[2]) &&
          !(bldc_gates[1] && bldc_gates[0]), "BLDC leg shoot-through");
  end

  // RC plant for the PID release
  real v = 0.0;
  always @(posedge clk) v <= v + (real'(pid_out) - v) / 64.0;
  assign pid_fb = 8'($rtoi(v + 0.5));

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(input int d, input int tol);
    return d <= tol && d >= -tol;
  endfunction

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    fork
      // ---------------- advanced PWM ----------------
      begin
        int hi = 0;
        pwm_enable = 1;
        repeat (2000) @(negedge clk);
        for (int i = 0; i < 1000; i++) begin @(negedge clk); hi += pwm_h; end
        check(near(hi - 250, 20), $sformatf("PWM high-side time %0d of 1000 (30 %% minus dead band)", hi));
        pwm_fault_n = 0;
        repeat (2) @(negedge clk);
        for (int i = 0; i < 300; i++) begin
          @(negedge clk);
          check(!pwm_h && !pwm_l, "PWM off during fault");
        end
        n_pwm_fault++;
        pwm_fault_n = 1;
        repeat (500) @(negedge clk);
      end
      // ---------------- soft start + sigma-delta ----------------
      begin
        int t0, ones;
        ss_target_duty = 8'd200;
        t0 = 0;
        while (ss_safe_duty != 8'd200 && t0 < 5000) begin @(negedge clk); t0++; end
        check(near(t0 - 800, 4), $sformatf("soft start reached 200 in %0d clocks (4 per step)", t0));
        n_ss_ramp++;
        ones = 0;
        for (int i = 0; i < 2560; i++) begin @(negedge clk); ones += ss_pdm_out; end
        check(near(ones - 2000, 2), $sformatf("PDM density %0d/2560", ones));
        ss_target_duty = 8'd50;
        t0 = 0;
        while (ss_safe_duty != 8'd50 && t0 < 5000) begin @(negedge clk); t0++; end
        check(near(t0 - 600, 4), $sformatf("soft stop reached 50 in %0d clocks", t0));
        ones = 0;
        for (int i = 0; i < 2560; i++) begin @(negedge clk); ones += sd_out; end
        check(near(ones - 640, 2), $sformatf("modulator density %0d/2560", ones));
      end
      // ---------------- SVPWM ----------------
      begin
        logic [2:0] s_prev;
        bit seen [6];
        repeat (100) @(negedge sv_clk);
        s_prev = sv_sector;
        for (int i = 0; i < 110000; i++) begin
          @(negedge sv_clk);
          if (sv_sector != s_prev) begin
            check(sv_sector == ((s_prev == 3'd5) ? 3'd0 : s_prev + 3'd1), "sectors advance in order");
            n_sv_sector_steps++;
            s_prev = sv_sector;
          end
          seen[sv_sector] = 1;
        end
        check(seen[0] && seen[1] && seen[2] && seen[3] && seen[4] && seen[5], "all six sectors visited");
        check(n_sv_sector_steps == 6 || n_sv_sector_steps == 7, $sformatf("%0d sector steps in 22 ms at 50 Hz", n_sv_sector_steps));
      end
      // ---------------- stepper ----------------
      begin
        logic [7:0] p0;
        st_enable = 1;
        repeat (20) @(negedge clk);
        p0 = st_phase;
        for (int i = 0; i < 40; i++) begin
          st_step = 1; repeat (10) @(negedge clk);
          st_step = 0; repeat (300) @(negedge clk);
          n_st_steps++;
        end
        check(st_phase == p0 + 8'd40, $sformatf("stepper phase %0d after 40 steps from %0d", st_phase, p0));
        st_dir = 0;
        for (int i = 0; i < 10; i++) begin
          st_step = 1; repeat (10) @(negedge clk);
          st_step = 0; repeat (300) @(negedge clk);
        end
        check(st_phase == p0 + 8'd30, "stepper reverses");
        st_fault_n = 0;
        repeat (5) @(negedge clk);
        for (int i = 0; i < 300; i++) begin
          @(negedge clk);
          check(st_a_gates[1:0] == 2'b00 && st_b_gates[1:0] == 2'b00, "stepper low sides off in fault");
          check(st_a_gates[3:2] == 2'b11 && st_b_gates[3:2] == 2'b11, "stepper high sides off in fault");
        end
        n_st_fault++;
        st_fault_n = 1;
        // half steps then full steps
        p0 = st_phase;
        st_dir = 1; st_step_mode = 2'd1;
        for (int i = 0; i < 3; i++) begin
          st_step = 1; repeat (10) @(negedge clk);
          st_step = 0; repeat (300) @(negedge clk);
        end
        check(st_phase == p0 + 8'd96, "three half steps = 96 microsteps");
        st_step_mode = 2'd2;
        for (int i = 0; i < 2; i++) begin
          st_step = 1; repeat (10) @(negedge clk);
          st_step = 0; repeat (300) @(negedge clk);
        end
        check(st_phase == p0 + 8'd224, "two full steps = 128 microsteps");
        n_st_modes = 2;
      end
      // ---------------- BLDC ----------------
      begin
        logic [2:0] seq [6] = '{3'b001, 3'b011, 3'b010, 3'b110, 3'b100, 3'b101};
        logic [5:0] exp_lo [6] = '{6'b000100, 6'b000001, 6'b000001, 6'b010000, 6'b010000, 6'b000100};
        logic [5:0] exp_hi [6] = '{6'b100000, 6'b100000, 6'b001000, 6'b001000, 6'b000010, 6'b000010};
        bldc_enable = 1;
        bldc_speed_fb = 16'd0;
        repeat (5000) @(negedge clk);
        check(bldc_throttle == 16'd1000, $sformatf("throttle saturates at full scale (%0d)", bldc_throttle));
        n_bldc_sat++;
        for (int i = 0; i < 24; i++) begin
          int gap;
          bldc_hall_state = seq[i % 6];
          gap = 0;
          for (int w = 0; w < 10 && bldc_gates != 6'b0; w++) @(negedge clk);
          while (bldc_gates == 6'b0 && gap < 100) begin @(negedge clk); gap++; end
          if (i > 0) begin
            check(gap == 11, $sformatf("BLDC dead band %0d clocks after Hall change", gap));
            n_bldc_dead++;
          end
          repeat (50) @(negedge clk);
          check((bldc_gates & ~exp_hi[i % 6]) == exp_lo[i % 6],
                $sformatf("hall %b gates %b", seq[i % 6], bldc_gates));
          check((bldc_gates & exp_hi[i % 6]) == exp_hi[i % 6], "high side on at full throttle");
          n_bldc_comm++;
          repeat (200) @(negedge clk);
        end
        bldc_hall_state = 3'b111;
        repeat (5) @(negedge clk);
        check(bldc_hall_error && bldc_gates == 0, "illegal Hall 111 flagged, gates off");
        bldc_hall_state = 3'b000;
        repeat (5) @(negedge clk);
        check(bldc_hall_error && bldc_gates == 0, "illegal Hall 000 flagged, gates off");
        n_bldc_err = 2;
        bldc_hall_state = 3'b001;
        bldc_speed_fb = 16'd3000;
        repeat (20000) @(negedge clk);
        check(bldc_throttle == 0, "overspeed drives throttle to zero");
      end
      // ---------------- PID release ----------------
      begin
        pid_enable = 1;
        pid_sp = 8'd180;
        repeat (30000) @(negedge clk);
        check(near(int'(pid_fb) - 180, 2), $sformatf("PID plant %0d for setpoint 180", pid_fb));
        pid_sp = 8'd60;
        repeat (30000) @(negedge clk);
        check(near(int'(pid_fb) - 60, 2), $sformatf("PID plant %0d for setpoint 60", pid_fb));
        n_pid_settle = 2;
      end
      // ---------------- QEI ----------------
      begin
        logic [1:0] qs [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
        int st = 0, ref_p = 0;
        for (int i = 0; i < 1000; i++) begin
          st = (st + 1) % 4;
          {qei_phase_a, qei_phase_b} = qs[st];
          ref_p = (ref_p == 399) ? 0 : ref_p + 1;
          if (ref_p == 0) n_qei_wrap++;
          repeat (4) @(negedge clk);
        end
        check(int'(qei_position) == ref_p && qei_direction, $sformatf("QEI forward %0d vs %0d", qei_position, ref_p));
        for (int i = 0; i < 300; i++) begin
          st = (st + 3) % 4;
          {qei_phase_a, qei_phase_b} = qs[st];
          ref_p = (ref_p == 0) ? 399 : ref_p - 1;
          if (ref_p == 399) n_qei_wrap++;
          repeat (4) @(negedge clk);
        end
        check(int'(qei_position) == ref_p && !qei_direction, $sformatf("QEI reverse %0d vs %0d", qei_position, ref_p));
        qei_index = 1; repeat (4) @(negedge clk); qei_index = 0; repeat (4) @(negedge clk);
        check(qei_position == 0, "QEI index clears");
        n_qei_index++;
        check(!qei_error, "QEI no error");
      end
      // ---------------- watchdog ----------------
      begin
        int t;
        wd_enable = 1;
        for (int i = 0; i < 4; i++) begin
          repeat (90) @(negedge clk);
          wd_feed = 1; @(negedge clk); wd_feed = 0;
          check(!wd_reset, "watchdog fed inside window");
        end
        t = 0;
        while (!wd_reset && t < 1000) begin
          @(negedge clk); t++;
          if (wd_ewi && n_wd_ewi == 0) n_wd_ewi = 1;
        end
        check(n_wd_ewi == 1, "early warning before timeout");
        check(wd_reset && wd_cause == 3'd4 && near(t - 160, 3), $sformatf("starvation reset after %0d clocks", t));
        n_wd_fault++;
        // re-arm, then an early clear, a late clear and a wrong key
        for (int k = 0; k < 3; k++) begin
          wd_enable = 0; repeat (3) @(negedge clk);
          check(!wd_reset, "disable re-arms the watchdog");
          wd_enable = 1;
          repeat (k == 0 ? 20 : k == 1 ? 130 : 80) @(negedge clk);
          wd_key = (k == 2) ? 8'h00 : 8'hA5;
          wd_feed = 1; @(negedge clk); wd_feed = 0; @(negedge clk);
          check(wd_reset && wd_cause == 3'(k + 1), $sformatf("watchdog fault cause %0d", wd_cause));
          n_wd_fault++;
        end
      end
      // ---------------- I2C ----------------
      begin
        int t;
        repeat (20) @(negedge clk);
        i2c_rw = 0; i2c_tx_data = 8'hA7; i2c_start = 1; @(negedge clk); i2c_start = 0;
        t = 0; while (!i2c_done && t < 20000) begin @(negedge clk); t++; end
        check(!i2c_ack_error && s_written == 8'hA7, $sformatf("I2C write got %h", s_written));
        repeat (50) @(negedge clk);
        i2c_rw = 1; i2c_start = 1; @(negedge clk); i2c_start = 0;
        t = 0; while (!i2c_done && t < 20000) begin @(negedge clk); t++; end
        check(!i2c_ack_error && i2c_rx_data == 8'h3C, $sformatf("I2C read %h", i2c_rx_data));
        n_i2c_stretch = s_nst;
        check(s_nst == 2, "clock stretching honoured twice");
      end
    join
    check(n_pwm_dead > 20 && n_pwm_fault == 1, "PWM mechanisms");
    check(n_ss_ramp == 1, "soft start mechanism");
    check(n_sv_dead > 1000, "SVPWM dead bands");
    check(n_st_steps == 40 && n_st_fault == 1 && n_st_modes == 2, "stepper mechanisms");
    check(n_bldc_comm == 24 && n_bldc_dead > 20 && n_bldc_err == 2 && n_bldc_sat == 1, "BLDC mechanisms");
    check(n_qei_wrap >= 3 && n_qei_index == 1, "QEI mechanisms");
    check(n_wd_ewi == 1 && n_wd_fault == 4, "watchdog mechanisms");
    check(n_pid_settle == 2, "PID mechanism");
    $display("pwm_dead %0d pwm_fault %0d sv_sector_steps %0d sv_dead %0d st_steps %0d st_fault %0d",
             n_pwm_dead, n_pwm_fault, n_sv_sector_steps, n_sv_dead, n_st_steps, n_st_fault);
    $display("bldc_comm %0d bldc_dead %0d bldc_err %0d bldc_sat %0d qei_wrap %0d qei_index %0d wd_ewi %0d wd_fault %0d i2c_stretch %0d",
             n_bldc_comm, n_bldc_dead, n_bldc_err, n_bldc_sat, n_qei_wrap, n_qei_index, n_wd_ewi, n_wd_fault, n_i2c_stretch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
