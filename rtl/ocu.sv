// ocu: Offset-Computation-Unit (OCU1 in PU1, OCU2 in PU2).
//
// For the mean of a range block mu_r and the mean of the block it is mapped
// to mu_d, computes the offset rho = mu_r - delta*mu_d for all four scale
// codes at once (delta = -0.5, 0.25, 0.5, 1, as in the document) and
// registers the four results (rho0..rho3). Each offset is quantised to a
// signed 7-bit code c with rho = 4*c, c = round(rho/4) clamped to -64..63;
// that quantisation is this design's choice, the document gives only the 7-bit
// width. Latency: one cycle from mu_r/mu_d to rho.
module ocu
  import fcic_pkg::*;
(
  input  logic                    clk,
  input  logic [7:0]              mu_r,
  input  logic [7:0]              mu_d,
  output logic [3:0][RHO_W-1:0]   rho
);
  logic [3:0][RHO_W-1:0] rho_c;

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      logic signed [12:0] r_q4;     // rho in quarter units
      logic signed [12:0] c;
      r_q4 = 13'(signed'({3'b000, mu_r, 2'b00})) - 13'(delta_q4(2'(d), mu_d));
      c = (r_q4 + 13'sd8) >>> 4;   // rho/4 rounded
      if (c > 13'sd63)       rho_c[d] = 7'd63;
      else if (c < -13'sd64) rho_c[d] = 7'h40;
      else                   rho_c[d] = c[RHO_W-1:0];
    end
  end

  always_ff @(posedge clk) rho <= rho_c;
endmodule
