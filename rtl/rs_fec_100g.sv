// rs_fec_100g: 16-channel three-parallel RS(255,239) FEC for 100 Gb/s links.
//
// Sixteen channels of three symbols (24 bits) per clock, 384 bits per clock,
// are decoded by four independent four-channel groups (rs_fec_4ch); each group
// has its own shared key equation solver, so the device holds 16 syndrome
// blocks, 4 KES blocks, 16 Chien/Forney correction blocks, and the input/output
// buffers and FIFO structure (4 x 12 bytes = 48 bytes per clock). At 300 MHz
// this carries 16 x 24 x 300e6 = 115.2 Gb/s of line data.
// Channel 4g+k is channel k of group g. All channels share frame_start (first
// triple of a codeword, every 85 clocks) and in_valid; outputs are aligned and
// appear LATENCY = 239 clocks after the input. The groups' controllers are
// identical copies running from the same frame_start.
// The three-parallel encoder (rs_enc3p) of the same code sits beside the
// decoder with its own ports (enc_*); it produces the parity the decoders check.
module rs_fec_100g
  import rs_gf_pkg::*;
#(
  parameter int unsigned NGRP    = 4,
  parameter int unsigned STEP    = 18,
  parameter int unsigned KES_LAT = 82
) (
  input  logic              clk,
  input  logic              rst_n,
  // decoder
  input  logic              frame_start,
  input  logic              in_valid,
  input  sym3_t             din        [4*NGRP],
  output sym3_t             dout       [4*NGRP],
  output logic [4*NGRP-1:0] dout_valid,
  output logic [4*NGRP-1:0] dout_first,
  output logic [2:0]        err_loc    [4*NGRP],
  // encoder
  input  logic              enc_valid,
  input  logic              enc_first,
  input  sym3_t             enc_msg,
  output logic              enc_parity_valid,
  output gf_t               enc_parity [16],
  output logic              enc_par_valid,
  output sym3_t             enc_par_out
);
  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    sym3_t      gi [4], go [4];
    logic [2:0] ge [4];
    for (genvar k = 0; k < 4; k++) begin : g_map
      assign gi[k]           = din[4*g+k];
      assign dout[4*g+k]     = go[k];
      assign err_loc[4*g+k]  = ge[k];
    end
    rs_fec_4ch #(.STEP(STEP), .KES_LAT(KES_LAT)) u_grp (
      .clk, .rst_n, .frame_start, .in_valid, .din(gi), .dout(go),
      .dout_valid(dout_valid[4*g +: 4]), .dout_first(dout_first[4*g +: 4]), .err_loc(ge)
    );
  end

  rs_enc3p u_enc (
    .clk, .rst_n, .in_valid(enc_valid), .in_first(enc_first), .m_in(enc_msg),
    .parity_valid(enc_parity_valid), .parity(enc_parity),
    .par_valid(enc_par_valid), .par_out(enc_par_out)
  );
endmodule
