// i2c_master_tb: master at its default 100 kHz setting (10 MHz clock)
// against a behavioural slave on an open-drain bus. Checks a write (slave
// receives address, R/W and data), a read (rx_data equals the slave's
// register, master answers NACK), a wrong address (ack_error), clock
// stretching by the slave, the SCL period (100 clocks = 10 us), START and
// STOP conditions on the bus, and the done/busy handshake.
//
// Interface: open-drain bus built from the two pull-low enables of master and
// slave. The START/address/ACK/data/STOP sequence and the 100 kHz clock
// follow the source; the slave model, the stretch time and the byte values
// are this testbench's choices.
module i2c_master_tb;
  logic clk = 0, rst_n = 0, start = 0, rw = 0;
  logic [6:0] addr;
  logic [7:0] txd, rxd, rdval, written, addr_byte;
  logic busy, done, ackerr, m_scl_oe, m_sda_oe, s_scl_oe, s_sda_oe, nacked;
  wire scl = ~(m_scl_oe | s_scl_oe);
  wire sda = ~(m_sda_oe | s_sda_oe);
  int n_write, n_read, n_stretch;
  int checks = 0, failures = 0, n_start = 0, n_stop = 0;

  i2c_master dut (.clk, .rst_n, .start, .addr, .rw, .tx_data (txd), .rx_data (rxd),
                  .busy, .done, .ack_error (ackerr),
                  .scl_oe (m_scl_oe), .scl_i (scl), .sda_oe (m_sda_oe), .sda_i (sda));

  i2c_slave_model #(.ADDR(7'h50), .STRETCH(3000)) slave (
    .scl, .sda, .scl_oe (s_scl_oe), .sda_oe (s_sda_oe), .read_value (rdval),
    .written, .last_addr_byte (addr_byte), .master_nacked (nacked),
    .n_write, .n_read, .n_stretch);

  always #50 clk = ~clk;     // 10 MHz

  always @(negedge sda) if (scl && rst_n) n_start++;
  always @(posedge sda) if (scl && rst_n) n_stop++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input logic [6:0] a, input logic r, input logic [7:0] d);
    int n;
    @(negedge clk) addr = a; rw = r; txd = d; start = 1;
    @(negedge clk) start = 0;
    check(busy, "busy during transfer");
    n = 0;
    while (!done && n < 10000) begin @(negedge clk); n++; end
    check(done, "transfer completes");
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SCL high-to-high period while the slave is not stretching
  int per_min = 1 << 30, per_max = 0;
  realtime last_rise = 0;
  always @(posedge scl) begin
    if (busy && last_rise > 0 && ($realtime - last_rise) < 50000) begin
      int p;
      p = int'(($realtime - last_rise) / 100.0);
      if (p < per_min) per_min = p;
      if (p > per_max) per_max = p;
    end
    last_rise = $realtime;
  end

  initial begin
    rdval = 8'hC3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    xfer(7'h50, 1'b0, 8'h96);
    check(!ackerr, "write acknowledged");
    check(addr_byte == {7'h50, 1'b0}, $sformatf("address byte %h", addr_byte));
    check(written == 8'h96, $sformatf("slave received %h", written));
    xfer(7'h50, 1'b1, 8'h00);
    check(!ackerr, "read acknowledged");
    check(rxd == 8'hC3, $sformatf("rx_data %h", rxd));
    check(nacked, "master NACKs the single read byte");
    xfer(7'h21, 1'b0, 8'h55);
    check(ackerr, "wrong address gives ack_error");
    check(n_write == 1 && n_read == 1, "slave saw one write and one read");
    check(n_stretch == 2, "clock stretching exercised");
    check(n_start == 3 && n_stop == 3, $sformatf("START %0d STOP %0d", n_start, n_stop));
    check(per_min == 100, $sformatf("SCL period min %0d clocks", per_min));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
