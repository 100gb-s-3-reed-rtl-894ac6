// rs_chien_cell: three-parallel Chien term generator for coefficient index K.
//
// Given a polynomial coefficient c (loaded with load = 1), the cell produces on
// every following clock n = 0, 1, ... the three terms
//   v[2] = c * a^(K(3n+1)),  v[1] = c * a^(K(3n+2)),  v[0] = c * a^(K(3n+3))
// i.e. the K-th term of the polynomial evaluated at a^(3n+1), a^(3n+2),
// a^(3n+3). Evaluating at a^l tests position 255-l, so lane [2] covers
// received symbols r254, r251, ... and lanes [1], [0] the two after it, the
// same lane order as the received data. Each of the three registers is
// multiplied by the constant (a^K)^3 per clock, as in the published Chien cell.
// The published cell loads c, c*a^K and c*a^2K; this one loads c*a^K, c*a^2K and
// c*a^3K so that the first clock evaluates a^1..a^3, the points the published description
// gives for the first clock (and which match the r254-first data order).
module rs_chien_cell
  import rs_gf_pkg::*;
#(
  parameter int unsigned K = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  gf_t   coef,
  output sym3_t v
);
  localparam gf_t AK1 = gf_alpha_pow(K);
  localparam gf_t AK2 = gf_alpha_pow(2 * K);
  localparam gf_t AK3 = gf_alpha_pow(3 * K);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else if (load) begin
      v[2] <= gf_mul(coef, AK1);
      v[1] <= gf_mul(coef, AK2);
      v[0] <= gf_mul(coef, AK3);
    end else begin
      v[2] <= gf_mul(v[2], AK3);
      v[1] <= gf_mul(v[1], AK3);
      v[0] <= gf_mul(v[0], AK3);
    end
  end
endmodule
