// i2c_master: single-byte I2C bus master (write or read) with open-drain pins.
//
// A pulse on start (while idle) runs one transaction: START condition, the
// 7-bit address and the R/W bit, the slave's acknowledge, one data byte
// (tx_data sent when rw = 0, rx_data received when rw = 1, the master
// answering a read with NACK), then a STOP condition, after which done
// pulses for one clock. A missing acknowledge sets ack_error and ends the
// transaction with STOP. Every bit is four quarter periods of CLK_DIV clocks:
// SCL low with SDA set up, SCL released, SDA sampled with SCL high, SCL
// pulled low again, so SCL runs at f_clk / (4*CLK_DIV): 100 kHz for a 10 MHz
// clock with the default. Bits go MSB first. While SCL is released the
// master waits for scl_i to read high, so a slave may stretch the clock.
// The pins are open drain: scl_oe/sda_oe = 1 pulls the line low, 0 releases
// it; scl_i/sda_i are the line levels.
// The state sequence (IDLE, START, ADDRESS, ACK_WAIT, DATA_TX/DATA_RX, STOP),
// the 7-bit addressing and the 100 kHz clock follow the source; the
// single-byte transaction, the quarter-period timing and the system clock
// are this design's choices.
module i2c_master #(
  parameter int CLK_DIV = 25
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] addr,
  input  logic       rw,
  input  logic [7:0] tx_data,
  output logic [7:0] rx_data,
  output logic       busy,
  output logic       done,
  output logic       ack_error,
  output logic       scl_oe,
  input  logic       scl_i,
  output logic       sda_oe,
  input  logic       sda_i
);

  typedef enum logic [2:0] {
    IDLE, START, ADDRESS, ACK_WAIT, DATA_TX, DATA_RX, MASTER_NACK, STOP
  } state_e;

  localparam int DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  state_e        state;
  logic [1:0]    q;
  logic [DW-1:0] div;
  logic [2:0]    bitcnt;
  logic [7:0]    shreg;
  logic          rw_q, data_phase, nack;
  logic [7:0]    tx_q;
  logic          tick, stretch;

  assign tick    = (div == DW'(CLK_DIV - 1));
  assign stretch = (q == 2'd1) && !scl_i;
  assign busy    = (state != IDLE);

  // Line drive for each state and quarter period.
  always_comb begin
    scl_oe = 1'b0;
    sda_oe = 1'b0;
    unique case (state)
      IDLE: ;
      START: begin
        sda_oe = (q != 2'd0);
        scl_oe = (q >= 2'd2);
      end
      ADDRESS, DATA_TX: begin
        scl_oe = (q == 2'd0) || (q == 2'd3);
        sda_oe = ~shreg[7];
      end
      ACK_WAIT, DATA_RX, MASTER_NACK: begin
        scl_oe = (q == 2'd0) || (q == 2'd3);
        sda_oe = 1'b0;
      end
      STOP: begin
        scl_oe = (q == 2'd0);
        sda_oe = (q <= 2'd1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      q          <= '0;
      div        <= '0;
      bitcnt     <= '0;
      shreg      <= '0;
      rw_q       <= 1'b0;
      tx_q       <= '0;
      data_phase <= 1'b0;
      nack       <= 1'b0;
      rx_data    <= '0;
      done       <= 1'b0;
      ack_error  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == IDLE) begin
        div <= '0;
        q   <= '0;
        if (start) begin
          state      <= START;
          rw_q       <= rw;
          tx_q       <= tx_data;
          shreg      <= {addr, rw};
          data_phase <= 1'b0;
          ack_error  <= 1'b0;
        end
      end else if (tick && !stretch) begin
        div <= '0;
        q   <= q + 2'd1;
        if (q == 2'd2) begin
          if (state == DATA_RX)  shreg <= {shreg[6:0], sda_i};
          if (state == ACK_WAIT) nack  <= sda_i;
        end
        if (q == 2'd3) begin
          unique case (state)
            START: begin
              state  <= ADDRESS;
              bitcnt <= 3'd7;
            end
            ADDRESS, DATA_TX: begin
              if (bitcnt == 3'd0) state <= ACK_WAIT;
              else begin
                bitcnt <= bitcnt - 3'd1;
                shreg  <= {shreg[6:0], 1'b0};
              end
            end
            ACK_WAIT: begin
              if (nack) begin
                ack_error <= 1'b1;
                state     <= STOP;
              end else if (data_phase) begin
                state <= STOP;
              end else begin
                data_phase <= 1'b1;
                bitcnt     <= 3'd7;
                if (rw_q) state <= DATA_RX;
                else begin
                  state <= DATA_TX;
                  shreg <= tx_q;
                end
              end
            end
            DATA_RX: begin
              if (bitcnt == 3'd0) begin
                rx_data <= shreg;
                state   <= MASTER_NACK;
              end else bitcnt <= bitcnt - 3'd1;
            end
            MASTER_NACK: state <= STOP;
            STOP: begin
              state <= IDLE;
              done  <= 1'b1;
            end
            default: state <= IDLE;
          endcase
        end
      end else if (!tick) begin
        div <= div + 1'b1;
      end
    end
  end

endmodule
