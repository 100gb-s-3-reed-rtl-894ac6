// tb_rs_chien_cell: loads random coefficients into Chien cells for K = 0, 1, 5
// and 8 and checks the three lane outputs over a full 85-clock sweep against
// c * a^(K l), l = 3n+1, 3n+2, 3n+3.
module tb_rs_chien_cell;
  import rs_gf_pkg::sym3_t;
  import rs_gf_pkg::gf_t;
  import rs_tb_pkg::*;

  logic  clk = 0, rst_n = 0, load = 0;
  gf_t   coef = 0;
  sym3_t v [4];
  int checks = 0, failures = 0;
  localparam int KS [4] = '{0, 1, 5, 8};

  for (genvar i = 0; i < 4; i++) begin : g
    rs_chien_cell #(.K(KS[i])) u (.clk, .rst_n, .load, .coef, .v(v[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      automatic gf_t c = rnd_byte();
      coef <= c; load <= 1;
      @(posedge clk);
      coef <= rnd_byte(); load <= 0;
      for (int n = 0; n < 85; n++) begin
        #1;
        for (int i = 0; i < 4; i++)
          for (int l = 0; l < 3; l++) begin
            automatic gf_t e = mul(c, apow(KS[i] * (3*n + 3 - l)));
            checks++;
            if (v[i][l] !== e) begin
              failures++; $display("K=%0d n=%0d lane %0d: %h expected %h", KS[i], n, l, v[i][l], e);
            end
          end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
