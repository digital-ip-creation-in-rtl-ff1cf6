// sd_modulator_tb: the number of ones in any 256 consecutive output bits
// must equal the 8-bit input exactly (first-order error feedback), checked
// for fixed codes including mid-scale and full-scale and for random codes.
//
// 10 ns clock; each input is held for 256 clocks. The density rule (ones per
// 256 clocks = input) follows from the first-order modulator the source
// describes.
module sd_modulator_tb;
  logic       clk = 0, rst_n = 0;
  logic [7:0] din;
  logic       dout;
  int checks = 0, failures = 0;

  sd_modulator dut (.clk, .rst_n, .digital_val_in (din), .sigma_delta_out (dout));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic density(input int v);
    int ones, longest_run, run;
    din = 8'(v);
    repeat (4) @(posedge clk);
    for (int w = 0; w < 3; w++) begin
      ones = 0;
      repeat (256) begin @(negedge clk); ones += int'(dout); end
      check(ones == v, $sformatf("code %0d: %0d ones in 256 clocks", v, ones));
    end
    // noise shaping: at mid-scale the stream alternates, never two equal bits
    if (v == 128) begin
      run = 0; longest_run = 0;
      for (int i = 0; i < 64; i++) begin
        logic b; @(negedge clk); b = dout;
        @(negedge clk);
        if (dout == b) run++;
      end
      check(run == 0, "mid-scale gives 1010... pattern");
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    density(0); density(1); density(128); density(255); density(64); density(200);
    repeat (10) density(int'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
