// rs_kes: key equation solver shared by NCH decoding channels.
//
// Solves the key equation w(x) = S(x) sigma(x) mod x^16 for the error locator
// sigma(x) (degree <= 8) and the error evaluator w(x) (degree <= 7) of one
// codeword at a time. The channels' syndrome blocks are phase shifted, so their
// serial syndrome streams reach the KES one after another and the one engine
// serves all of them (controller #2 supplies in_start/in_sel).
//
// Algorithm. The published architecture names the pipelined degree-computationless modified
// Euclidean algorithm for this block but does not describe it; this block
// instead uses the inversionless Berlekamp-Massey iteration, which yields the
// same sigma(x) up to a constant factor, followed by w(x) = S(x) sigma(x)
// mod x^16. The factor cancels in both the Chien search (roots) and the Forney
// formula (ratio w / sigma_odd), so the downstream blocks are unaffected.
//   lambda = 1, B = 1, gamma = 1, k = 0; for r = 0..15:
//     delta   = sum_j lambda_j S_(r-j)
//     lambda' = gamma lambda + delta x B
//     if delta != 0 and k >= 0: B' = lambda, gamma' = delta, k' = -k-1
//     else                      B' = x B,                    k' = k+1
//
// Timing. in_start marks the clock on which S15 of channel in_sel is on
// syn_in[in_sel]; S14..S0 follow on the next 15 clocks. The engine starts
// after the last syndrome, takes one load clock, 16 iteration clocks and one
// clock for w(x), and parks the result in the channel's holding registers.
// Exactly LATENCY clocks after in_start (82 by default, the KES delay the published design
// gives, including its input/output buffering) the channel's coef_valid is high
// for 9 clocks and coef carries {sigma_j, w_j} for j = 0..8 (w_8 = 0): sixteen
// bits per clock, as on the KES-to-Chien links of the four-channel block.
// Successive in_start pulses must be at least 18 clocks apart.
module rs_kes
  import rs_gf_pkg::*;
#(
  parameter int unsigned NCH     = 4,
  parameter int unsigned LATENCY = 82
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  gf_t                    syn_in [NCH],
  input  logic                   in_start,
  input  logic [$clog2(NCH)-1:0] in_sel,
  output logic [15:0]            coef [NCH],
  output logic [NCH-1:0]         coef_valid,
  output logic [NCH-1:0]         coef_first
);
  localparam int unsigned CW = $clog2(NCH);

  // ---------------- syndrome collector ----------------
  gf_t          sreg [16];
  logic         col_busy;
  logic [3:0]   col_cnt;
  logic [CW-1:0] col_ch;
  logic         eng_go;     // collector finished last clock

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) sreg[i] <= '0;
      col_busy <= 1'b0;
      col_cnt  <= '0;
      col_ch   <= '0;
      eng_go   <= 1'b0;
    end else begin
      eng_go <= 1'b0;
      if (in_start) begin
        sreg[15] <= syn_in[in_sel];
        col_cnt  <= 4'd1;
        col_ch   <= in_sel;
        col_busy <= 1'b1;
      end else if (col_busy) begin
        sreg[4'd15 - col_cnt] <= syn_in[col_ch];
        col_cnt <= col_cnt + 1'b1;
        if (col_cnt == 4'd15) begin
          col_busy <= 1'b0;
          eng_go   <= 1'b1;
        end
      end
    end
  end

  // ---------------- Berlekamp-Massey engine ----------------
  typedef enum logic [1:0] {E_IDLE, E_ITER, E_OMEGA} eng_state_e;
  eng_state_e   st;
  gf_t          es [16];        // syndromes of the codeword in the engine
  gf_t          lam [9];
  gf_t          bb  [9];
  gf_t          gam;
  logic signed [5:0] kk;
  logic [3:0]   rr;
  logic [CW-1:0] ech;

  gf_t          delta;
  gf_t          lam_n [9];
  gf_t          omg_n [8];

  always_comb begin
    delta = '0;
    for (int j = 0; j < 9; j++)
      if (int'(rr) >= j) delta ^= gf_mul(lam[j], es[(int'(rr) >= j) ? int'(rr) - j : 0]);
    for (int j = 0; j < 9; j++)
      lam_n[j] = gf_mul(gam, lam[j]) ^ ((j > 0) ? gf_mul(delta, bb[(j > 0) ? j-1 : 0]) : 8'h00);
    for (int i = 0; i < 8; i++) begin
      omg_n[i] = '0;
      for (int j = 0; j <= i; j++) omg_n[i] ^= gf_mul(lam[j], es[i-j]);
    end
  end

  // holding registers, one set per channel
  gf_t sig_h [NCH][9];
  gf_t omg_h [NCH][8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= E_IDLE;
      for (int i = 0; i < 16; i++) es[i] <= '0;
      for (int j = 0; j < 9; j++) begin lam[j] <= '0; bb[j] <= '0; end
      gam <= '0;
      kk  <= '0;
      rr  <= '0;
      ech <= '0;
      for (int c = 0; c < NCH; c++) begin
        for (int j = 0; j < 9; j++) sig_h[c][j] <= '0;
        for (int j = 0; j < 8; j++) omg_h[c][j] <= '0;
      end
    end else begin
      unique case (st)
        E_IDLE: if (eng_go) begin
          for (int i = 0; i < 16; i++) es[i] <= sreg[i];
          for (int j = 0; j < 9; j++) begin
            lam[j] <= (j == 0) ? 8'h01 : 8'h00;
            bb[j]  <= (j == 0) ? 8'h01 : 8'h00;
          end
          gam <= 8'h01;
          kk  <= '0;
          rr  <= '0;
          ech <= col_ch;
          st  <= E_ITER;
        end
        E_ITER: begin
          for (int j = 0; j < 9; j++) lam[j] <= lam_n[j];
          if (delta != 0 && kk >= 0) begin
            for (int j = 0; j < 9; j++) bb[j] <= lam[j];
            gam <= delta;
            kk  <= -kk - 6'sd1;
          end else begin
            for (int j = 0; j < 9; j++) bb[j] <= (j == 0) ? 8'h00 : bb[(j > 0) ? j-1 : 0];
            kk <= kk + 6'sd1;
          end
          rr <= rr + 1'b1;
          if (rr == 4'd15) st <= E_OMEGA;
        end
        E_OMEGA: begin
          for (int j = 0; j < 9; j++) sig_h[ech][j] <= lam[j];
          for (int j = 0; j < 8; j++) omg_h[ech][j] <= omg_n[j];
          st <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
    end
  end

  // ---------------- fixed-latency output, one timer per channel ----------------
  logic [6:0] tmr  [NCH];
  logic [3:0] beat [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_out
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tmr[c]  <= '0;
        beat[c] <= '0;
      end else begin
        if (in_start && in_sel == CW'(c)) tmr[c] <= 7'(LATENCY - 1);
        else if (tmr[c] != 0)             tmr[c] <= tmr[c] - 1'b1;
        if (tmr[c] == 7'd1)    beat[c] <= 4'd9;
        else if (beat[c] != 0) beat[c] <= beat[c] - 1'b1;
      end
    end
    always_comb begin
      logic [3:0] j;
      j = 4'd9 - beat[c];
      coef_valid[c] = (beat[c] != 0);
      coef_first[c] = (beat[c] == 4'd9);
      coef[c] = '0;
      if (beat[c] != 0)
        coef[c] = {sig_h[c][(j < 9) ? j : 0], (j < 8) ? omg_h[c][(j < 8) ? j : 0] : 8'h00};
    end
  end

  // rules of use
  a_start_free: assert property (@(posedge clk) disable iff (!rst_n) !(in_start && col_busy))
    else $error("rs_kes: in_start while collecting");
  a_engine_free: assert property (@(posedge clk) disable iff (!rst_n) !(eng_go && st != E_IDLE))
    else $error("rs_kes: engine still busy");
  initial assert (LATENCY >= 40 && LATENCY < 128) else $error("rs_kes: LATENCY out of range");
endmodule
