// gf_mul_pipe: two-stage pipelined GF(2^8) multiplier of the Chien/Forney block.
//
// The published architecture marks its Forney multipliers as pipelined with two stages. Stage 1
// forms the 15-bit carry-less product of a and b; stage 2 reduces it modulo the
// field polynomial. p is a*b from two clocks earlier. How the work is split
// between the stages is this design's choice.
module gf_mul_pipe
  import rs_gf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  gf_t  a,
  input  gf_t  b,
  output gf_t  p
);
  logic [14:0] prod_q;
  logic [14:0] prod_d;
  gf_t         red_d;

  always_comb begin
    prod_d = '0;
    for (int i = 0; i < 8; i++)
      if (b[i]) prod_d ^= 15'(a) << i;
  end

  // reduction of bits 14..8 with x^8 = x^4+x^3+x^2+1
  always_comb begin
    logic [14:0] r;
    r = prod_q;
    for (int i = 14; i >= 8; i--)
      if (r[i]) r ^= 15'h11D << (i - 8);
    red_d = r[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      p      <= '0;
    end else begin
      prod_q <= prod_d;
      p      <= red_d;
    end
  end
endmodule
