// rs_enc3p: three-parallel systematic RS(255,239) encoder.
//
// Computes p(x) = x^16 m(x) mod g(x) three message symbols per clock. The 239
// message symbols are taken as 80 triples after padding one zero symbol in
// front, so a message is [0, m238, m237], [m236, m235, m234], ..., [m2, m1, m0].
// Each clock the 16-symbol remainder P is advanced by three positions:
//   P' = (P mod x^13) * x^3 + (M2 + P15) g2(x) + (M1 + P14) g1(x) + (M0 + P13) g0(x)
// with the partial generator polynomials gK(x) = x^(16+K) mod g(x); their
// coefficients are constants computed at elaboration, so every product is a
// constant multiplier as in the three-row multiplier bank of the encoder.
//
// Interface: m_in[2] is lane M2 (highest degree), m_in[0] lane M0. in_first
// marks the first triple of a message; the M2 lane of that triple is the pad
// position and is forced to zero here (the published encoder realises the pad with a register
// on the M2 port; forcing the lane is this design's equivalent). in_valid must
// be high for the 80 message clocks. One clock after the 80th triple,
// parity_valid pulses with all 16 parity symbols on parity (parity[15] = p15,
// the coefficient of x^15), and over the next six clocks par_valid/par_out
// stream them three per clock, highest degree first (last triple = p0, 0, 0).
// A new message may start right after the 80th triple.
module rs_enc3p
  import rs_gf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  sym3_t m_in,
  output logic  parity_valid,
  output gf_t   parity [16],
  output logic  par_valid,
  output sym3_t par_out
);
  localparam poly16_t G0 = gf_xn_mod_g(16);
  localparam poly16_t G1 = gf_xn_mod_g(17);
  localparam poly16_t G2 = gf_xn_mod_g(18);

  gf_t        p_q [16];       // remainder registers P0..P15
  gf_t        p_d [16];
  gf_t        o_q [18];       // output shift register, o_q[17] leaves first
  logic [6:0] cnt_q;          // message triples taken
  logic [2:0] ocnt_q;         // output triples left

  always_comb begin
    gf_t f2, f1, f0;
    gf_t base [16];
    for (int j = 0; j < 16; j++) base[j] = in_first ? 8'h00 : p_q[j];
    f2 = (in_first ? 8'h00 : m_in[2]) ^ base[15];
    f1 = m_in[1] ^ base[14];
    f0 = m_in[0] ^ base[13];
    for (int j = 0; j < 16; j++)
      p_d[j] = ((j >= 3) ? base[(j >= 3) ? j-3 : 0] : 8'h00)
             ^ gf_mul(f2, G2[j]) ^ gf_mul(f1, G1[j]) ^ gf_mul(f0, G0[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 16; j++) p_q[j] <= '0;
      for (int j = 0; j < 18; j++) o_q[j] <= '0;
      cnt_q        <= '0;
      ocnt_q       <= '0;
      parity_valid <= 1'b0;
    end else begin
      parity_valid <= 1'b0;
      if (ocnt_q != 0) begin
        ocnt_q <= ocnt_q - 1'b1;
        for (int j = 17; j >= 3; j--) o_q[j] <= o_q[j-3];
        for (int j = 0; j < 3; j++)   o_q[j] <= '0;
      end
      if (in_valid) begin
        for (int j = 0; j < 16; j++) p_q[j] <= p_d[j];
        if (in_first) cnt_q <= 7'd1;
        else          cnt_q <= cnt_q + 1'b1;
        if ((in_first ? 7'd1 : cnt_q + 1'b1) == 7'(ENC_CYC)) begin
          parity_valid <= 1'b1;
          ocnt_q       <= 3'd6;
          for (int j = 0; j < 16; j++) o_q[j+2] <= p_d[j];
          o_q[1] <= '0;
          o_q[0] <= '0;
        end
      end
    end
  end

  always_comb begin
    for (int j = 0; j < 16; j++) parity[j] = o_q[j+2];
    par_valid = (ocnt_q != 0);
    par_out   = {o_q[17], o_q[16], o_q[15]};
  end
endmodule
