// ip_tables_pkg: constant look-up tables shared by the motor-control cores.
// SINE_Q15[k]  = round(32767 * sin(2*pi*k/64)),  k = 0..63  (one full period,
//                used by the SVPWM reference generator; cosine = entry k+16).
// QSIN_U8[i]   = round(255 * sin(pi/2 * i/64)),  i = 0..64  (quarter wave,
//                used by the stepper indexer for 256 microsteps per cycle).
// The 64-point Q15 sine table is the size named in the SVPWM block diagram;
// the 8-bit quarter-wave table is this implementation's own choice.
package ip_tables_pkg;

  localparam logic signed [15:0] SINE_Q15 [64] = '{
    16'sd0, 16'sd3212, 16'sd6393, 16'sd9512, 16'sd12539, 16'sd15446, 16'sd18204, 16'sd20787,
    16'sd23170, 16'sd25329, 16'sd27245, 16'sd28898, 16'sd30273, 16'sd31356, 16'sd32137, 16'sd32609,
    16'sd32767, 16'sd32609, 16'sd32137, 16'sd31356, 16'sd30273, 16'sd28898, 16'sd27245, 16'sd25329,
    16'sd23170, 16'sd20787, 16'sd18204, 16'sd15446, 16'sd12539, 16'sd9512, 16'sd6393, 16'sd3212,
    16'sd0, -16'sd3212, -16'sd6393, -16'sd9512, -16'sd12539, -16'sd15446, -16'sd18204, -16'sd20787,
    -16'sd23170, -16'sd25329, -16'sd27245, -16'sd28898, -16'sd30273, -16'sd31356, -16'sd32137, -16'sd32609,
    -16'sd32767, -16'sd32609, -16'sd32137, -16'sd31356, -16'sd30273, -16'sd28898, -16'sd27245, -16'sd25329,
    -16'sd23170, -16'sd20787, -16'sd18204, -16'sd15446, -16'sd12539, -16'sd9512, -16'sd6393, -16'sd3212
  };

  localparam logic [7:0] QSIN_U8 [65] = '{
    8'd0, 8'd6, 8'd13, 8'd19, 8'd25, 8'd31, 8'd37, 8'd44,
    8'd50, 8'd56, 8'd62, 8'd68, 8'd74, 8'd80, 8'd86, 8'd92,
    8'd98, 8'd103, 8'd109, 8'd115, 8'd120, 8'd126, 8'd131, 8'd136,
    8'd142, 8'd147, 8'd152, 8'd157, 8'd162, 8'd167, 8'd171, 8'd176,
    8'd180, 8'd185, 8'd189, 8'd193, 8'd197, 8'd201, 8'd205, 8'd208,
    8'd212, 8'd215, 8'd219, 8'd222, 8'd225, 8'd228, 8'd231, 8'd233,
    8'd236, 8'd238, 8'd240, 8'd242, 8'd244, 8'd246, 8'd247, 8'd249,
    8'd250, 8'd251, 8'd252, 8'd253, 8'd254, 8'd254, 8'd255, 8'd255,
    8'd255
  };

endpackage
