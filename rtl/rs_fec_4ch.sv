// rs_fec_4ch: three-parallel four-channel RS(255,239) decoder group.
//
// Four channels, each receiving one codeword of 255 symbols as 85 triples
// (three symbols per clock, r254/r253/r252 first), are decoded with four
// syndrome blocks, one shared key equation solver and four Chien/Forney
// correction blocks. The KES needs only ~18 clocks per codeword while a
// codeword lasts 85, so the input buffer phase-shifts channel k by k*STEP
// clocks; the syndrome sets then reach the KES one after another, and the
// output buffer undoes the shift. The received data waits in the FIFO
// structure (one read port per channel) until the correction reaches it.
//
// Timing, from the clock on which a codeword's first triple is on din (with
// frame_start): syndromes leave channel k's block 86 + k*STEP clocks later,
// the KES returns sigma/w KES_LAT (82) clocks after that, the Chien block loads
// 9 clocks later and corrects from 7 clocks after its load. All channels leave
// the group together, LATENCY = 85+1+KES_LAT+9+1+7+3*STEP = 239 clocks after
// they entered (the published design quotes 242). frame_start must recur every 85 clocks
// while data flows, all four channels carry codewords aligned to it, and in
// codewords must follow each other without gaps (in_valid only labels them).
// dout_valid/dout_first mark the corrected output; err_loc flags the corrected
// lanes. Controllers #1..#3 are rs_fec_ctrl.
module rs_fec_4ch
  import rs_gf_pkg::*;
#(
  parameter int unsigned STEP    = 18,
  parameter int unsigned KES_LAT = 82
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_start,
  input  logic       in_valid,
  input  sym3_t      din        [4],
  output sym3_t      dout       [4],
  output logic [3:0] dout_valid,
  output logic [3:0] dout_first,
  output logic [2:0] err_loc    [4]
);
  localparam int unsigned NCH        = 4;
  localparam int unsigned FIFO_BASE  = RS_CYC + 1 + KES_LAT + 9 + 7;
  localparam int unsigned LATENCY    = FIFO_BASE + 1 + (NCH - 1) * STEP;

  // ---------------- controllers #1..#3 ----------------
  logic [NCH-1:0] syn_first, chien_load;
  logic           kes_start;
  logic [1:0]     kes_sel;

  rs_fec_ctrl #(.NCH(NCH), .STEP(STEP), .KES_LAT(KES_LAT)) u_ctrl (
    .clk, .rst_n, .frame_start, .syn_first, .kes_start, .kes_sel, .chien_load
  );

  // ---------------- input buffer ----------------
  logic [23:0] ib_in [NCH], ib_out [NCH];
  for (genvar k = 0; k < NCH; k++) begin : g_ibin
    assign ib_in[k] = din[k];
  end
  rs_stagger_buf #(.NCH(NCH), .W(24), .STEP(STEP), .REVERSE(1'b0)) u_ibuf (
    .clk, .rst_n, .din(ib_in), .dout(ib_out)
  );

  // ---------------- syndrome blocks ----------------
  gf_t  syn [NCH];
  logic syn_v [NCH];
  for (genvar k = 0; k < NCH; k++) begin : g_syn
    rs_syndrome3p u_syn (
      .clk, .rst_n, .first(syn_first[k]), .r_in(ib_out[k]), .s_out(syn[k]), .s_valid(syn_v[k])
    );
  end

  // ---------------- shared KES ----------------
  logic [15:0]    coef [NCH];
  logic [NCH-1:0] coef_valid, coef_first;
  rs_kes #(.NCH(NCH), .LATENCY(KES_LAT)) u_kes (
    .clk, .rst_n, .syn_in(syn), .in_start(kes_start), .in_sel(kes_sel),
    .coef, .coef_valid, .coef_first
  );

  // ---------------- FIFO structure ----------------
  logic [23:0] fifo_d [NCH];
  logic [1:0]  fifo_t [NCH];
  rs_fifo #(.NCH(NCH), .W(24), .TAG_W(2), .DEPTH(256), .BASE(FIFO_BASE), .STEP(STEP)) u_fifo (
    .clk, .rst_n, .din(ib_in), .tag({in_valid, frame_start}), .dout(fifo_d), .tag_out(fifo_t)
  );

  // ---------------- Chien search + error correction ----------------
  logic [28:0] ob_in [NCH], ob_out [NCH];
  for (genvar k = 0; k < NCH; k++) begin : g_chien
    sym3_t      cd;
    logic [1:0] ct;
    logic [2:0] ce;
    rs_chien_forney3p #(.TAG_W(2)) u_cf (
      .clk, .rst_n, .coef(coef[k]), .coef_valid(coef_valid[k]), .coef_first(coef_first[k]),
      .load(chien_load[k]), .data_in(fifo_d[k]), .tag_in(fifo_t[k]),
      .data_out(cd), .tag_out(ct), .err_loc(ce)
    );
    assign ob_in[k] = {ce, ct, cd};
  end

  // ---------------- output buffer ----------------
  rs_stagger_buf #(.NCH(NCH), .W(29), .STEP(STEP), .REVERSE(1'b1)) u_obuf (
    .clk, .rst_n, .din(ob_in), .dout(ob_out)
  );
  for (genvar k = 0; k < NCH; k++) begin : g_out
    assign dout[k]       = ob_out[k][23:0];
    assign dout_first[k] = ob_out[k][24];
    assign dout_valid[k] = ob_out[k][25];
    assign err_loc[k]    = ob_out[k][28:26];
  end

  // Every channel's syndrome stream must coincide with its KES slot.
  for (genvar k = 0; k < NCH; k++) begin : g_chk
    a_slot: assert property (@(posedge clk) disable iff (!rst_n)
      (kes_start && kes_sel == 2'(k)) |-> syn_v[k])
      else $error("rs_fec_4ch: KES slot of channel %0d without syndromes", k);
  end
  initial assert (LATENCY == FIFO_BASE + 1 + 3 * STEP);
endmodule
