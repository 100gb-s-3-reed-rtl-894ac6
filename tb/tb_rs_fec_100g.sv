// tb_rs_fec_100g: end-to-end test of the 16-channel FEC at its default size.
// Messages are first encoded by the three-parallel encoder of the design and
// its parity is checked against a reference division; the resulting codewords
// (reference codewords for the other channels) get 0..8 random symbol errors
// and stream back to back through all 16 decoder channels. Every output
// symbol, its valid/first framing, err_loc and the fixed 239-clock latency are
// checked. Mechanisms counted (each must occur): parity words produced by the
// encoder, KES slots served per group and channel (KES sharing), corrected
// symbols, words at the full correction capability t = 8, error-free words.
module tb_rs_fec_100g;
  import rs_gf_pkg::sym3_t;
  import rs_gf_pkg::gf_t;
  import rs_tb_pkg::*;

  localparam int LAT = 239;
  localparam int NW  = 6;           // codewords per channel
  localparam int NC  = 16;

  logic        clk = 0, rst_n = 0, frame_start = 0, in_valid = 0;
  sym3_t       din [NC], dout [NC];
  logic [NC-1:0] dout_valid, dout_first;
  logic [2:0]  err_loc [NC];
  logic        enc_valid = 0, enc_first = 0, enc_parity_valid, enc_par_valid;
  sym3_t       enc_msg = '0, enc_par_out;
  gf_t         enc_parity [16];
  int checks = 0, failures = 0, cyc = 0;

  rs_fec_100g dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NW * 85 + 3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cw_t good [NC][NW], rx [NC][NW], err [NC][NW];
  int  nerr [NC][NW];
  int  t_in = -1;
  int  words_ok = 0, corrected = 0, full_t = 0, clean = 0, enc_words = 0;
  int  kes_use [4][4];

  always @(posedge clk) if (rst_n) begin
    if (dut.g_grp[0].u_grp.kes_start) kes_use[0][dut.g_grp[0].u_grp.kes_sel]++;
    if (dut.g_grp[1].u_grp.kes_start) kes_use[1][dut.g_grp[1].u_grp.kes_sel]++;
    if (dut.g_grp[2].u_grp.kes_start) kes_use[2][dut.g_grp[2].u_grp.kes_sel]++;
    if (dut.g_grp[3].u_grp.kes_start) kes_use[3][dut.g_grp[3].u_grp.kes_sel]++;
  end

  always @(posedge clk) if (rst_n && t_in >= 0) begin
    automatic int rel = cyc - t_in - LAT;
    for (int ch = 0; ch < NC; ch++) begin
      automatic bit exp_v = (rel >= 0 && rel < NW * 85);
      checks++;
      if (dout_valid[ch] !== exp_v) begin
        failures++; $display("ch %0d clk %0d: valid %b expected %b", ch, rel, dout_valid[ch], exp_v);
      end
      if (exp_v) begin
        automatic int n = rel / 85, k = rel % 85;
        checks++;
        if (dout_first[ch] !== (k == 0)) begin failures++; $display("ch %0d first flag wrong", ch); end
        for (int l = 0; l < 3; l++) begin
          automatic int p = 252 - 3*k + l;
          checks++;
          if (dout[ch][l] !== good[ch][n][p]) begin
            failures++; $display("ch %0d word %0d pos %0d: %h expected %h", ch, n, p, dout[ch][l], good[ch][n][p]);
          end
          checks++;
          if (err_loc[ch][l] !== (err[ch][n][p] != 0)) begin failures++; $display("ch %0d err_loc wrong", ch); end
          if (err_loc[ch][l]) corrected++;
        end
        if (k == 84) begin
          words_ok++;
          if (nerr[ch][n] == 8) full_t++;
          if (nerr[ch][n] == 0) clean++;
        end
      end
    end
  end

  // encoder parity capture: word n of channel 0 comes from the RTL encoder
  int enc_n = 0;
  always @(posedge clk) if (rst_n && enc_parity_valid) begin
    for (int j = 0; j < 16; j++) begin
      checks++;
      if (enc_parity[j] !== good[0][enc_n][j]) begin
        failures++; $display("encoder word %0d parity[%0d] %h expected %h", enc_n, j, enc_parity[j], good[0][enc_n][j]);
      end
    end
    enc_n++;
    enc_words++;
  end

  initial begin
    init();
    for (int ch = 0; ch < NC; ch++)
      for (int n = 0; n < NW; n++) random_codeword(good[ch][n]);
    for (int ch = 0; ch < NC; ch++) din[ch] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // transmit side: encode channel 0's messages with the design's encoder
    for (int n = 0; n < NW; n++)
      for (int c = 0; c < 80; c++) begin
        enc_valid <= 1;
        enc_first <= (c == 0);
        enc_msg   <= {(c == 0) ? 8'h00 : good[0][n][255 - 3*c], good[0][n][254 - 3*c], good[0][n][253 - 3*c]};
        @(posedge clk);
      end
    enc_valid <= 0; enc_first <= 0;
    repeat (10) @(posedge clk);
    // errors
    for (int ch = 0; ch < NC; ch++)
      for (int n = 0; n < NW; n++) begin
        rx[ch][n] = good[ch][n];
        nerr[ch][n] = (ch + 3 * n) % 9;
        add_errors(rx[ch][n], nerr[ch][n], err[ch][n]);
      end
    // receive side
    for (int n = 0; n < NW + 3; n++)
      for (int k = 0; k < 85; k++) begin
        frame_start <= (k == 0);
        in_valid    <= (n < NW);
        for (int ch = 0; ch < NC; ch++)
          din[ch] <= (n < NW) ? {rx[ch][n][254-3*k], rx[ch][n][253-3*k], rx[ch][n][252-3*k]} : '0;
        @(posedge clk);
        if (n == 0 && k == 0) t_in = cyc;
      end
    frame_start <= 0; in_valid <= 0;
    repeat (LAT) @(posedge clk);
    checks++;
    if (words_ok != NC * NW) begin failures++; $display("%0d of %0d words out", words_ok, NC * NW); end
    checks++;
    if (enc_words != NW) begin failures++; $display("encoder produced %0d parity words", enc_words); end
    for (int g = 0; g < 4; g++)
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (kes_use[g][k] < NW) begin failures++; $display("KES %0d served channel %0d %0d times", g, k, kes_use[g][k]); end
      end
    checks++;
    if (corrected == 0 || full_t == 0 || clean == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("words %0d, encoder words %0d, corrected symbols %0d, words with t=8 errors %0d, error-free words %0d, KES0 slots %0d %0d %0d %0d",
             words_ok, enc_words, corrected, full_t, clean, kes_use[0][0], kes_use[0][1], kes_use[0][2], kes_use[0][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
