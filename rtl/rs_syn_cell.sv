// rs_syn_cell: one three-parallel syndrome cell, S_IDX = R(alpha^IDX).
//
// Each clock the cell takes three received symbols, lane A (highest degree),
// B and C, and updates its accumulator, flip-flop (1):
//   acc' = A*(a^IDX)^2 + B*a^IDX + C + (first ? 0 : acc*(a^IDX)^3)
// so after the 85 triples of a codeword acc = S_IDX (Horner in steps of x^3).
// On the clock that carries the first triple of the next codeword (first = 1)
// the finished syndrome moves into the output flip-flop (2); on other clocks
// flip-flop (2) takes s_prev from the neighbouring cell, which makes the 16
// cells a shift register that unloads the syndromes serially.
// All three multipliers are by constants. Structure and mux settings follow the
// published syndrome cell; reset values are this design's choice.
module rs_syn_cell
  import rs_gf_pkg::*;
#(
  parameter int unsigned IDX = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  first,     // mux (3) and mux (4) select
  input  sym3_t r_in,      // [2] = A, [1] = B, [0] = C
  input  gf_t   s_prev,    // flip-flop (2) of the previous cell
  output gf_t   s_out      // flip-flop (2)
);
  localparam gf_t A1 = gf_alpha_pow(IDX);
  localparam gf_t A2 = gf_alpha_pow(2 * IDX);
  localparam gf_t A3 = gf_alpha_pow(3 * IDX);

  gf_t acc_q, acc_d, fb;

  always_comb begin
    fb    = first ? 8'h00 : gf_mul(acc_q, A3);
    acc_d = gf_mul(r_in[2], A2) ^ gf_mul(r_in[1], A1) ^ r_in[0] ^ fb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      s_out <= '0;
    end else begin
      acc_q <= acc_d;
      s_out <= first ? acc_q : s_prev;
    end
  end
endmodule
