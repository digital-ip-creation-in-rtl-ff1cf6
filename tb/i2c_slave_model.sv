// i2c_slave_model: behavioural single-register I2C slave for testbenches.
// Open-drain: scl_oe/sda_oe = 1 pulls the line low. It waits for a START,
// takes the address byte, acknowledges only its own address, then either
// stores one written byte (acknowledged) or returns its register MSB first
// and records the master's acknowledge bit. After the address acknowledge
// it can hold SCL low for STRETCH time units (clock stretching).
//
// kind: behavioural model, not synthesizable (uses event controls and
// delays). It stands for the slave device the source simulates against; its
// register and stretching behaviour are this model's own.
module i2c_slave_model #(
  parameter logic [6:0] ADDR    = 7'h50,
  parameter int         STRETCH = 0
) (
  input  logic       scl,
  input  logic       sda,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic [7:0] read_value,
  output logic [7:0] written,
  output logic [7:0] last_addr_byte,
  output logic       master_nacked,
  output int         n_write,
  output int         n_read,
  output int         n_stretch
);
  initial begin
    logic [7:0] sh;
    scl_oe = 0; sda_oe = 0; written = 0; last_addr_byte = 0; master_nacked = 0;
    n_write = 0; n_read = 0; n_stretch = 0;
    forever begin
      @(negedge sda iff scl);                       // START
      for (int i = 7; i >= 0; i--) begin @(posedge scl); sh[i] = sda; end
      last_addr_byte = sh;
      @(negedge scl);
      if (sh[7:1] == ADDR) begin
        sda_oe = 1;                                  // ACK
        if (STRETCH > 0) begin
          scl_oe = 1; #(STRETCH); scl_oe = 0; n_stretch++;
        end
        @(negedge scl);
        sda_oe = 0;
        if (!sh[0]) begin
          for (int i = 7; i >= 0; i--) begin @(posedge scl); sh[i] = sda; end
          @(negedge scl) sda_oe = 1;
          @(negedge scl) sda_oe = 0;
          written = sh;
          n_write++;
        end else begin
          for (int i = 7; i >= 0; i--) begin
            sda_oe = ~read_value[i];
            @(negedge scl);
          end
          sda_oe = 0;
          @(posedge scl) master_nacked = sda;
          n_read++;
        end
      end
      @(posedge sda iff scl);                        // STOP
    end
  end
endmodule
