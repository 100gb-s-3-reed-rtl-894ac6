// tb_rs_chien_forney3p: drives the Chien/Forney block with sigma(x) and w(x)
// computed in the testbench from known error patterns (sigma = prod(1 - x X),
// w = S sigma mod x^16), back to back every 85 clocks, presents the received
// word on data_in seven clocks after load, and checks that the output, eight
// clocks after load, is the error-free codeword, that err_loc marks exactly the
// error positions and that tag_in reaches tag_out with the data.
module tb_rs_chien_forney3p;
  import rs_gf_pkg::sym3_t;
  import rs_tb_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] coef = 0;
  logic        coef_valid = 0, coef_first = 0, load = 0;
  sym3_t       data_in = '0, data_out;
  logic [1:0]  tag_in = 0, tag_out;
  logic [2:0]  err_loc;
  int checks = 0, failures = 0, cyc = 0;

  rs_chien_forney3p dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NW = 8;
  cw_t   good [NW], rx [NW], err [NW];
  byte_t sg [NW][9];
  byte_t om [NW][9];

  function automatic void key(int n);
    byte_t s [16];
    for (int j = 0; j < 9; j++) sg[n][j] = (j == 0) ? 8'h01 : 8'h00;
    for (int p = 0; p < 255; p++) if (err[n][p] != 0)
      for (int j = 8; j > 0; j--) sg[n][j] ^= mul(sg[n][j-1], apow(p));
    for (int i = 0; i < 16; i++) s[i] = syndrome(rx[n], i);
    for (int i = 0; i < 9; i++) begin
      om[n][i] = 0;
      if (i < 8) for (int j = 0; j <= i; j++) om[n][i] ^= mul(sg[n][j], s[i-j]);
    end
    // scale both by a random non-zero constant: the block must not care
    begin
      automatic byte_t k = 0;
      while (k == 0) k = rnd_byte();
      for (int j = 0; j < 9; j++) begin sg[n][j] = mul(sg[n][j], k); om[n][j] = mul(om[n][j], k); end
    end
  endfunction

  localparam int B0 = 30;
  always @(posedge clk) begin
    automatic int n, off;
    cyc <= cyc + 1;
    coef_valid <= 0; coef_first <= 0; load <= 0;
    data_in <= '0; tag_in <= 0;
    for (n = 0; n < NW; n++) begin
      off = cyc - (B0 + 85 * n);
      if (off >= -10 && off < -1) begin
        coef_valid <= 1;
        coef_first <= (off == -10);
        coef <= {sg[n][off + 10], om[n][off + 10]};
      end
      if (off == -1) load <= 1;
      if (off >= 6 && off < 6 + 85) begin
        automatic int k = off - 6;
        data_in <= {rx[n][254-3*k], rx[n][253-3*k], rx[n][252-3*k]};
        tag_in  <= {1'b1, k == 0};
      end
      if (off >= 8 && off < 8 + 85) begin
        automatic int k = off - 8;
        for (int l = 0; l < 3; l++) begin
          automatic int p = 252 - 3*k + l;
          checks++;
          if (data_out[l] !== good[n][p]) begin
            failures++; $display("word %0d pos %0d: %h expected %h", n, p, data_out[l], good[n][p]);
          end
          checks++;
          if (err_loc[l] !== (err[n][p] != 0)) begin
            failures++; $display("word %0d pos %0d: err_loc %b", n, p, err_loc[l]);
          end
        end
        checks++;
        if (tag_out !== {1'b1, k == 0}) begin failures++; $display("tag %b at k=%0d", tag_out, k); end
      end
    end
  end

  initial begin
    init();
    for (int n = 0; n < NW; n++) begin
      random_codeword(good[n]);
      rx[n] = good[n];
      add_errors(rx[n], (n == 0) ? 0 : (n <= 8 ? n : 8), err[n]);
      key(n);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (cyc == B0 + 85 * NW + 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
