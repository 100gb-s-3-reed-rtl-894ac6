// rs_syndrome3p: three-parallel syndrome computation block.
//
// Sixteen rs_syn_cell instances compute S_0 .. S_15 of a 255-symbol codeword
// received three symbols per clock in 85 clocks (first triple r254, r253, r252).
// Their output flip-flops are chained S_0 -> S_1 -> ... -> S_15, with a zero fed
// into S_0, and the chain end is the block output. On the clock after first
// (the start of the next codeword) the chain holds the 16 new syndromes, and
// s_out then shows S_15, S_14, ..., S_0 on 16 consecutive clocks (this
// order follows from the chain direction; the KES block collects accordingly).
// s_valid marks those 16 clocks. The block has no gaps: a codeword must follow
// the previous one without idle clocks, and the syndromes of the last codeword
// are unloaded by one more first pulse.
module rs_syndrome3p
  import rs_gf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  first,
  input  sym3_t r_in,
  output gf_t   s_out,
  output logic  s_valid
);
  gf_t        chain [RS_2T];
  logic [4:0] cnt_q;

  for (genvar i = 0; i < RS_2T; i++) begin : g_cell
    rs_syn_cell #(.IDX(i)) u_cell (
      .clk, .rst_n, .first, .r_in,
      .s_prev (i == 0 ? 8'h00 : chain[(i == 0) ? 0 : i-1]),
      .s_out  (chain[i])
    );
  end

  assign s_out   = chain[RS_2T-1];
  assign s_valid = (cnt_q != 0);

  // counts the 16 unload clocks
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt_q <= '0;
    else if (first)      cnt_q <= 5'(RS_2T);
    else if (cnt_q != 0) cnt_q <= cnt_q - 1'b1;
  end
endmodule
