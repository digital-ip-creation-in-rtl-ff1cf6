// svpwm_sector_id_tb: the sector reported for random reference vectors must
// equal floor(angle/60 degrees) computed with atan2 (angles within 0.2
// degrees of a sector border are skipped), plus a sweep through all six.
//
// Combinational block; 3000 vectors.
module svpwm_sector_id_tb;
  localparam real PI = 3.14159265358979;
  logic signed [15:0] va, vb;
  logic [2:0] sector;
  int checks = 0, failures = 0;
  int seen [6];

  svpwm_sector_id dut (.v_alpha (va), .v_beta (vb), .sector);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m, th, deg, frac;
    int exp_s;
    for (int i = 0; i < 3000; i++) begin
      m  = 0.05 + 0.95 * real'($urandom_range(0, 10000)) / 10000.0;
      th = 2.0 * PI * real'($urandom_range(0, 35999)) / 36000.0;
      va = 16'($rtoi(32767.0 * m * $cos(th)));
      vb = 16'($rtoi(32767.0 * m * $sin(th)));
      #1;
      deg = $atan2(real'(vb), real'(va)) * 180.0 / PI;
      if (deg < 0) deg += 360.0;
      exp_s = $rtoi($floor(deg / 60.0)) % 6;
      frac = deg - 60.0 * $floor(deg / 60.0);
      if (frac > 0.2 && frac < 59.8) begin
        check(int'(sector) == exp_s, $sformatf("angle %f: sector %0d expected %0d", deg, sector, exp_s));
        seen[exp_s]++;
      end
    end
    for (int k = 0; k < 6; k++) check(seen[k] > 0, $sformatf("sector %0d exercised", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
