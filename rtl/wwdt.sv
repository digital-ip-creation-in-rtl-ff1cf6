// wwdt: windowed watchdog timer with key-protected feed.
//
// A tick counter advances once every TICK_DIV clocks and restarts at every
// accepted feed. A feed is a rising edge of feed together with the magic
// value KEY on key. Counting in ticks since the last accepted feed:
//   count <  window_open                  window not yet open: a feed is an
//                                         early-clear fatal fault
//   window_open <= count <= window_close  window open: a feed with the right
//                                         key restarts the count
//   count >  window_close                 window closed again: a feed is a
//                                         late-clear fatal fault
//   count >= timeout - timeout/4          early warning interrupt ewi
//   count == timeout                      starvation: fatal fault
// The two bounds are run-time inputs; 25 % and 75 % of the timeout is the
// intended setting.
// A feed with a wrong key is a fatal fault whatever the count. A fatal fault
// sets wdt_reset, records the cause and stops the counter; wdt_reset stays
// high until rst_n or until enable is lowered, which also holds the counter
// at zero and re-arms the watchdog.
// The window with a lower and an upper bound, the early and late clear
// faults, the early warning interrupt, the invalid-key fault, the starvation
// timeout and the 8-bit configuration follow the source; the key value, the
// cause encoding, the 75 % warning point and the tick divider are this
// design's choices. Timing: faults and the restart take effect at the clock
// edge after the feed edge; ewi follows count by one clock.
module wwdt #(
  parameter logic [7:0] KEY      = 8'hA5,
  parameter int         TICK_DIV = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       feed,
  input  logic [7:0] key,
  input  logic [7:0] window_open,
  input  logic [7:0] window_close,
  input  logic [7:0] timeout,
  output logic [7:0] count,
  output logic       ewi,
  output logic       wdt_reset,
  output logic [2:0] cause
);

  typedef enum logic [2:0] {
    CAUSE_NONE    = 3'd0,
    CAUSE_EARLY   = 3'd1,
    CAUSE_LATE    = 3'd2,
    CAUSE_BAD_KEY = 3'd3,
    CAUSE_TIMEOUT = 3'd4
  } cause_e;

  localparam int DW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;

  logic [DW-1:0] div;
  logic          tick, feed_q, feed_rise;
  logic [7:0]    ewi_point;

  assign tick      = (div == DW'(TICK_DIV - 1));
  assign feed_rise = feed & ~feed_q;
  assign ewi_point = timeout - (timeout >> 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= '0;
      count     <= '0;
      feed_q    <= 1'b0;
      ewi       <= 1'b0;
      wdt_reset <= 1'b0;
      cause     <= CAUSE_NONE;
    end else begin
      feed_q <= feed;
      if (!enable || wdt_reset) begin
        div   <= '0;
        ewi   <= 1'b0;
        if (!enable) begin
          count     <= '0;
          wdt_reset <= 1'b0;
          cause     <= CAUSE_NONE;
        end
      end else if (feed_rise) begin
        if (key != KEY) begin
          wdt_reset <= 1'b1;
          cause     <= CAUSE_BAD_KEY;
        end else if (count < window_open) begin
          wdt_reset <= 1'b1;
          cause     <= CAUSE_EARLY;
        end else if (count > window_close) begin
          wdt_reset <= 1'b1;
          cause     <= CAUSE_LATE;
        end else begin
          div   <= '0;
          count <= '0;
          ewi   <= 1'b0;
        end
      end else begin
        div <= tick ? '0 : div + 1'b1;
        if (count >= timeout) begin
          wdt_reset <= 1'b1;
          cause     <= CAUSE_TIMEOUT;
        end else if (tick) begin
          count <= count + 1'b1;
        end
        ewi <= (count >= ewi_point);
      end
    end
  end

endmodule
