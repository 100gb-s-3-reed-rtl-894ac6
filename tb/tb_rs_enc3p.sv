// tb_rs_enc3p: checks the three-parallel encoder against a serial reference
// division, for random messages fed back to back (80 clocks each), both on the
// parallel parity bus and on the three-lane parity stream, and checks that the
// parity appears one clock after the 80th message triple.
module tb_rs_enc3p;
  import rs_gf_pkg::sym3_t;
  import rs_gf_pkg::gf_t;
  import rs_tb_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_first = 0;
  sym3_t m_in = '0;
  logic  parity_valid, par_valid;
  gf_t   parity [16];
  sym3_t par_out;
  int    checks = 0, failures = 0;
  int    cyc = 0;

  rs_enc3p dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NMSG = 6;
  cw_t exp_cw [NMSG];
  int  last_cyc [NMSG];
  int  got = 0, sgot = 0;

  // parallel parity checker
  always @(posedge clk) if (rst_n && parity_valid) begin
    checks++;
    if (cyc != last_cyc[got] + 1) begin
      failures++; $display("parity timing: cycle %0d expected %0d", cyc, last_cyc[got] + 1);
    end
    for (int j = 0; j < 16; j++) begin
      checks++;
      if (parity[j] !== exp_cw[got][j]) begin
        failures++; $display("msg %0d parity[%0d] %h expected %h", got, j, parity[j], exp_cw[got][j]);
      end
    end
    got++;
  end

  // serial parity stream checker
  int sbeat = 0;
  always @(posedge clk) if (rst_n && par_valid) begin
    for (int l = 0; l < 3; l++) begin
      automatic int idx = 15 - 3*sbeat - (2 - l);
      automatic gf_t e = (idx >= 0) ? exp_cw[sgot][idx] : 8'h00;
      checks++;
      if (par_out[l] !== e) begin
        failures++; $display("msg %0d beat %0d lane %0d %h expected %h", sgot, sbeat, l, par_out[l], e);
      end
    end
    sbeat++;
    if (sbeat == 6) begin sbeat = 0; sgot++; end
  end

  initial begin
    init();
    for (int n = 0; n < NMSG; n++) random_codeword(exp_cw[n]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < NMSG; n++) begin
      for (int c = 0; c < 80; c++) begin
        // padded message: position 3c maps to symbol index 239 - 3c (pad at 239)
        automatic int hi = 239 - 3*c;
        m_in[2]  <= (c == 0) ? rnd_byte() : exp_cw[n][hi + 16];   // pad lane carries junk; must be ignored
        m_in[1]  <= exp_cw[n][hi - 1 + 16];
        m_in[0]  <= exp_cw[n][hi - 2 + 16];
        in_valid <= 1;
        in_first <= (c == 0);
        @(posedge clk);
        last_cyc[n] = cyc;
      end
      if (n == 2) begin   // one gap between messages
        in_valid <= 0; in_first <= 0;
        repeat (7) @(posedge clk);
      end
    end
    in_valid <= 0; in_first <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (got != NMSG || sgot != NMSG) begin
      failures++; $display("got %0d parity sets, %0d streams, expected %0d", got, sgot, NMSG);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
