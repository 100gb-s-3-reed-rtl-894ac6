// tb_rs_syndrome3p: streams random codewords with 0..8 errors and random words
// back to back through the syndrome block and checks the 16 serial outputs
// (S15 first) and their s_valid window against a Horner reference.
module tb_rs_syndrome3p;
  import rs_gf_pkg::sym3_t;
  import rs_gf_pkg::gf_t;
  import rs_tb_pkg::*;

  logic  clk = 0, rst_n = 0, first = 0;
  sym3_t r_in = '0;
  gf_t   s_out;
  logic  s_valid;
  int    checks = 0, failures = 0;

  rs_syndrome3p dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NW = 6;
  cw_t words [NW];
  initial begin
    cw_t err;
    init();
    for (int n = 0; n < NW; n++) begin
      if (n == NW - 1) for (int i = 0; i < 255; i++) words[n][i] = rnd_byte();
      else begin
        random_codeword(words[n]);
        add_errors(words[n], n * 2, err);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n <= NW; n++) begin
      for (int c = 0; c < 85; c++) begin
        if (n < NW) r_in <= {words[n][254-3*c], words[n][253-3*c], words[n][252-3*c]};
        else        r_in <= '0;
        first <= (c == 0);
        @(posedge clk);
        #1;
        if (n > 0 && c <= 15) begin
          checks++;
          if (!s_valid) begin failures++; $display("s_valid low at c=%0d", c); end
          checks++;
          if (s_out !== syndrome(words[n-1], 15 - c)) begin
            failures++;
            $display("word %0d S%0d = %h expected %h", n-1, 15-c, s_out, syndrome(words[n-1], 15-c));
          end
        end
        if (c == 16) begin
          checks++;
          if (s_valid) begin failures++; $display("s_valid high after unload"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
