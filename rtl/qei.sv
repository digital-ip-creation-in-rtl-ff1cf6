// qei: quadrature encoder interface with 4x decoding.
//
// phase_a, phase_b and index are synchronised by two flip-flops each. Every
// change of the (A,B) pair is one count: the sequence 00 -> 10 -> 11 -> 01 ->
// 00 (A leading B) counts up and sets direction to 1, the reverse sequence
// counts down and sets direction to 0, so each encoder line period gives
// four counts. The W-bit position wraps from max_count to 0 going up and
// from 0 to max_count going down. A rising edge of index clears the position
// (zero reference) and takes priority over a count on the same clock. A
// change of both lines at once cannot be decoded: it is not counted and sets
// the sticky error flag. enable low stops counting. The position updates
// three clocks after an input edge (two synchroniser stages, one register).
// Edge detection, 4x counting, the direction flag, the index reset and the
// 16-bit counter follow the source; the wrap at max_count and the error flag
// are this design's choices.
module qei #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic         phase_a,
  input  logic         phase_b,
  input  logic         index,
  input  logic [W-1:0] max_count,
  output logic [W-1:0] position,
  output logic         direction,
  output logic         error
);

  logic [1:0] sync_a, sync_b, sync_i;
  logic [1:0] ab_prev, ab;
  logic       idx_prev;
  logic       up, down, idx_rise;

  assign ab       = {sync_a[1], sync_b[1]};
  assign idx_rise = sync_i[1] & ~idx_prev;

  always_comb begin
    up   = 1'b0;
    down = 1'b0;
    unique case ({ab_prev, ab})
      4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: up   = 1'b1;
      4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: down = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_a    <= '0;
      sync_b    <= '0;
      sync_i    <= '0;
      ab_prev   <= '0;
      idx_prev  <= 1'b0;
      position  <= '0;
      direction <= 1'b1;
      error     <= 1'b0;
    end else begin
      sync_a   <= {sync_a[0], phase_a};
      sync_b   <= {sync_b[0], phase_b};
      sync_i   <= {sync_i[0], index};
      ab_prev  <= ab;
      idx_prev <= sync_i[1];
      if (enable) begin
        if (ab_prev[1] != ab[1] && ab_prev[0] != ab[0]) error <= 1'b1;
        if (idx_rise) begin
          position <= '0;
        end else if (up) begin
          position  <= (position >= max_count) ? '0 : position + 1'b1;
          direction <= 1'b1;
        end else if (down) begin
          position  <= (position == '0) ? max_count : position - 1'b1;
          direction <= 1'b0;
        end
      end
    end
  end

endmodule
