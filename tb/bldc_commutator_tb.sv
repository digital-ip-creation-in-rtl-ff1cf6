// bldc_commutator_tb: walks the Hall sensors through the six-step sequence
// forwards and backwards and with random jumps and invalid codes. For every
// valid state the chopped high-side gate must follow pwm on the right phase
// and the right low-side gate must be held on, all others off; after every
// Hall change the gates stay off for dead_time+1 clocks (the change
// detector adds the one); 000 and 111 raise hall_error with all gates off; fault_n
// removes every gate in the same cycle.
//
// 10 ns clock; each Hall code is held long enough for the synchroniser and
// the dead band to pass. The commutation table and the Hall-error rule follow
// the source; the table order and the dead band of dead_time+1 clocks are
// this design's choices and are checked as such.
module bldc_commutator_tb;
  logic clk = 0, rst_n = 0, enable = 1, fault_n = 1, pwm = 0;
  logic [2:0] hall;
  logic [7:0] dead;
  logic ah, al, bh, bl, ch, cl, herr;
  int checks = 0, failures = 0, n_dead = 0, n_err = 0;
  // six-step order: Hall code, phase switched high, phase switched low (0=A,1=B,2=C)
  int SEQ [6] = '{1, 3, 2, 6, 4, 5};
  int HI  [6] = '{0, 0, 1, 1, 2, 2};
  int LO  [6] = '{1, 2, 2, 0, 0, 1};

  bldc_commutator dut (.clk, .rst_n, .enable, .fault_n, .hall_state (hall), .pwm, .dead_time (dead),
                       .ah, .al, .bh, .bl, .ch, .cl, .hall_error (herr));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n && ((ah && al) || (bh && bl) || (ch && cl))) begin
    failures++; $display("FAIL: shoot-through");
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply a Hall code, measure the off gap, then check the steady state
  task automatic apply(input int code, input int d);
    int idx, gap;
    static int prev_code = 1;
    logic [2:0] hs, ls;
    dead = 8'(d);
    @(negedge clk);
    hall = 3'(code);
    idx = -1;
    for (int s = 0; s < 6; s++) if (SEQ[s] == code) idx = s;
    // gates keep the old pair for one more clock, then go off
    @(negedge clk); @(negedge clk);
    gap = 0;
    while (!(al || bl || cl) && gap < 300) begin @(negedge clk); gap++; end
    if (idx >= 0) begin
      check(gap == ((code == prev_code) ? 0 : d + 1), $sformatf("hall %0d: off gap %0d expected %0d", code, gap, d));
      n_dead++;
      repeat (20) begin
        pwm = 1'($urandom_range(0, 1)); #1;
        hs = {ch, bh, ah}; ls = {cl, bl, al};
        check(hs == (pwm ? 3'(1 << HI[idx]) : 3'b000), $sformatf("hall %0d high gates %b pwm %b", code, hs, pwm));
        check(ls == 3'(1 << LO[idx]), $sformatf("hall %0d low gates %b", code, ls));
        check(!herr, "no hall error");
        @(negedge clk);
      end
    end else begin
      n_err++;
      repeat (10) begin
        pwm = 1'($urandom_range(0, 1)); #1;
        check(herr, "invalid hall code flagged");
        check({ah, al, bh, bl, ch, cl} == '0, "invalid hall code: all gates off");
        @(negedge clk);
      end
    end
    prev_code = code;
  endtask

  initial begin
    hall = 3'd1; dead = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    apply(1, 0);
    for (int r = 0; r < 2; r++) for (int s = 1; s <= 6; s++) apply(SEQ[s % 6], int'($urandom_range(0, 12)));
    for (int s = 5; s >= 0; s--) apply(SEQ[s], 5);
    apply(0, 3); apply(1, 3); apply(7, 3); apply(6, 3);
    for (int i = 0; i < 30; i++) apply(int'($urandom_range(0, 7)), int'($urandom_range(0, 20)));
    apply(2, 0);
    @(negedge clk) pwm = 1; fault_n = 0; #1;
    check({ah, al, bh, bl, ch, cl} == '0, "fault_n low removes every gate at once");
    @(negedge clk) fault_n = 1; enable = 0; #1;
    check({ah, al, bh, bl, ch, cl} == '0, "enable low removes every gate");
    check(n_dead > 20 && n_err > 2, "dead bands and hall faults exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
