// tb_rs_syn_cell: feeds random received words (85 triples each, back to back)
// into syndrome cells for i = 0, 5 and 15 and checks the syndrome that reaches
// flip-flop (2) one clock after the next first pulse against a Horner reference.
// Also checks that s_prev is passed through on the other clocks.
module tb_rs_syn_cell;
  import rs_gf_pkg::sym3_t;
  import rs_gf_pkg::gf_t;
  import rs_tb_pkg::*;

  logic  clk = 0, rst_n = 0, first = 0;
  sym3_t r_in = '0;
  gf_t   s_prev = '0;
  gf_t   s0, s5, s15;
  int    checks = 0, failures = 0;

  rs_syn_cell #(.IDX(0))  u0  (.clk, .rst_n, .first, .r_in, .s_prev, .s_out(s0));
  rs_syn_cell #(.IDX(5))  u5  (.clk, .rst_n, .first, .r_in, .s_prev, .s_out(s5));
  rs_syn_cell #(.IDX(15)) u15 (.clk, .rst_n, .first, .r_in, .s_prev, .s_out(s15));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, gf_t got, gf_t exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  cw_t words [4];
  initial begin
    init();
    for (int n = 0; n < 4; n++)
      for (int i = 0; i < 255; i++) words[n][i] = rnd_byte();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      for (int c = 0; c < 85; c++) begin
        r_in   <= {words[n][254-3*c], words[n][253-3*c], words[n][252-3*c]};
        first  <= (c == 0);
        s_prev <= rnd_byte();
        @(posedge clk);
        #1;
        if (c == 0 && n > 0) begin
          check($sformatf("word %0d S0", n-1),  s0,  syndrome(words[n-1], 0));
          check($sformatf("word %0d S5", n-1),  s5,  syndrome(words[n-1], 5));
          check($sformatf("word %0d S15", n-1), s15, syndrome(words[n-1], 15));
        end
        if (c == 3) check("shift path", s5, s_prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
