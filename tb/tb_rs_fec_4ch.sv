// tb_rs_fec_4ch: end-to-end test of one four-channel group. Streams random
// codewords, back to back, on all four channels with 0..8 random symbol errors
// (every count from 0 to 8 appears), and checks that every output codeword is
// the error-free one, that it leaves exactly LATENCY = 239 clocks after it
// entered, that err_loc marks exactly the error positions and that the valid
// and first flags frame it. It also counts how often the shared KES served
// each channel.
module tb_rs_fec_4ch;
  import rs_gf_pkg::sym3_t;
  import rs_tb_pkg::*;

  localparam int LAT = 239;
  localparam int NW  = 12;          // codewords per channel

  logic       clk = 0, rst_n = 0, frame_start = 0, in_valid = 0;
  sym3_t      din [4];
  sym3_t      dout [4];
  logic [3:0] dout_valid, dout_first;
  logic [2:0] err_loc [4];
  int checks = 0, failures = 0, cyc = 0;

  rs_fec_4ch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NW * 85 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cw_t good [4][NW], rx [4][NW], err [4][NW];
  int  nerr [4][NW];
  int  t_in = -1;                 // clock of the first triple of word 0
  int  words_ok = 0, corrected = 0, max_err_words = 0;
  int  kes_use [4];

  always @(posedge clk) if (rst_n) begin
    if (dut.kes_start) kes_use[dut.kes_sel]++;
  end

  // output checker
  always @(posedge clk) if (rst_n && t_in >= 0) begin
    automatic int rel = cyc - t_in - LAT;
    for (int ch = 0; ch < 4; ch++) begin
      automatic bit exp_v = (rel >= 0 && rel < NW * 85);
      checks++;
      if (dout_valid[ch] !== exp_v) begin
        failures++; $display("ch %0d clk %0d: valid %b expected %b", ch, rel, dout_valid[ch], exp_v);
      end
      if (exp_v) begin
        automatic int n = rel / 85, k = rel % 85;
        checks++;
        if (dout_first[ch] !== (k == 0)) begin failures++; $display("ch %0d first flag wrong at %0d", ch, rel); end
        for (int l = 0; l < 3; l++) begin
          automatic int p = 252 - 3*k + l;
          checks++;
          if (dout[ch][l] !== good[ch][n][p]) begin
            failures++; $display("ch %0d word %0d pos %0d: %h expected %h", ch, n, p, dout[ch][l], good[ch][n][p]);
          end
          checks++;
          if (err_loc[ch][l] !== (err[ch][n][p] != 0)) begin
            failures++; $display("ch %0d word %0d pos %0d: err_loc wrong", ch, n, p);
          end
          if (err_loc[ch][l]) corrected++;
        end
        if (k == 84) begin
          words_ok++;
          if (nerr[ch][n] == 8) max_err_words++;
        end
      end
    end
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    init();
    for (int ch = 0; ch < 4; ch++)
      for (int n = 0; n < NW; n++) begin
        random_codeword(good[ch][n]);
        rx[ch][n] = good[ch][n];
        nerr[ch][n] = (n < 9) ? (n + ch) % 9 : $urandom_range(8, 0);
        add_errors(rx[ch][n], nerr[ch][n], err[ch][n]);
      end
    for (int ch = 0; ch < 4; ch++) din[ch] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // NW words, then two more frames of zeros to flush
    for (int n = 0; n < NW + 3; n++)
      for (int k = 0; k < 85; k++) begin
        frame_start <= (k == 0);
        in_valid    <= (n < NW);
        for (int ch = 0; ch < 4; ch++)
          din[ch] <= (n < NW) ? {rx[ch][n][254-3*k], rx[ch][n][253-3*k], rx[ch][n][252-3*k]} : '0;
        @(posedge clk);
        if (n == 0 && k == 0) t_in = cyc;
      end
    frame_start <= 0; in_valid <= 0;
    repeat (LAT) @(posedge clk);
    checks++;
    if (words_ok != 4 * NW) begin failures++; $display("%0d of %0d words out", words_ok, 4 * NW); end
    for (int ch = 0; ch < 4; ch++) begin
      checks++;
      if (kes_use[ch] < NW) begin failures++; $display("KES served channel %0d %0d times", ch, kes_use[ch]); end
    end
    checks++;
    if (max_err_words == 0 || corrected == 0) begin failures++; $display("no t=8 word or no correction seen"); end
    $display("words %0d, corrected symbols %0d, words with 8 errors %0d, KES slots %0d %0d %0d %0d",
             words_ok, corrected, max_err_words, kes_use[0], kes_use[1], kes_use[2], kes_use[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
