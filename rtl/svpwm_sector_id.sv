// svpwm_sector_id: finds which 60-degree sector holds the reference vector.
//
// Combinational. Sector k (0..5) covers angles [60k, 60k+60) degrees and is
// the one k for which proj(k) >= 0 and proj(k+1) < 0 (see svpwm_pkg). The
// test needs only sign comparisons of three projections, no angle or
// arctangent. A zero vector matches no sector and reports sector 0 (its
// dwell times are zero anyway). The role of the block follows the source
// block diagram; the projection method is this design's choice.
module svpwm_sector_id
  import svpwm_pkg::*;
(
  input  logic signed [15:0] v_alpha,
  input  logic signed [15:0] v_beta,
  output sector_t            sector
);

  logic [5:0] nonneg;

  always_comb begin
    for (int j = 0; j < 6; j++)
      nonneg[j] = (proj(v_alpha, v_beta, j) >= 0);
    sector = '0;
    for (int k = 0; k < 6; k++)
      if (nonneg[k] && !nonneg[(k + 1) % 6])
        sector = sector_t'(k);
  end

endmodule
