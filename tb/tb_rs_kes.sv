// tb_rs_kes: feeds the syndromes of random codewords with 0..8 symbol errors
// into the shared KES on four channels, 18 clocks apart, as the syndrome blocks
// do. For each result it checks that coef_first comes exactly LATENCY clocks
// after in_start and that the returned sigma(x) and w(x) locate every error
// (Chien) and give its value (Forney), and nothing else.
module tb_rs_kes;
  import rs_gf_pkg::gf_t;
  import rs_tb_pkg::*;

  localparam int NCH = 4;
  localparam int LAT = 82;

  logic        clk = 0, rst_n = 0;
  gf_t         syn_in [NCH];
  logic        in_start = 0;
  logic [1:0]  in_sel = 0;
  logic [15:0] coef [NCH];
  logic [NCH-1:0] coef_valid, coef_first;
  int checks = 0, failures = 0, cyc = 0;

  rs_kes #(.NCH(NCH), .LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NJOB = 24;
  cw_t   errs [NJOB];
  int    start_cyc [NJOB];
  int    job_ch [NJOB];
  int    done = 0;

  // per channel queue of outstanding jobs
  int    q [NCH][$];
  byte_t sig [NCH][9];
  byte_t omg [NCH][9];
  int    bcnt [NCH];

  function automatic byte_t peval(byte_t p [9], byte_t x, int step, int first_idx);
    byte_t acc = 0, xp = 1;
    for (int j = first_idx; j < 9; j += step) acc ^= mul(p[j], apow(log_t[x] * j));
    return (x == 0) ? p[0] : acc;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) begin
      if (coef_first[c]) begin
        checks++;
        if (q[c].size() == 0) begin failures++; $display("unexpected output ch %0d", c); end
        else if (cyc != start_cyc[q[c][0]] + LAT) begin
          failures++; $display("ch %0d latency %0d expected %0d", c, cyc - start_cyc[q[c][0]], LAT);
        end
        bcnt[c] = 0;
      end
      if (coef_valid[c]) begin
        sig[c][bcnt[c]] = coef[c][15:8];
        omg[c][bcnt[c]] = coef[c][7:0];
        bcnt[c]++;
        if (bcnt[c] == 9 && q[c].size() > 0) begin
          automatic int job = q[c].pop_front();
          for (int p = 0; p < 255; p++) begin
            automatic byte_t x = apow(-p);          // X^-1 for position p
            automatic byte_t s = 0, so = 0, w = 0, ev;
            for (int j = 0; j < 9; j++) begin
              s ^= mul(sig[c][j], apow(log_t[x] * j));
              if (j % 2 == 1) so ^= mul(sig[c][j], apow(log_t[x] * j));
              w ^= mul(omg[c][j], apow(log_t[x] * j));
            end
            ev = (s == 0) ? mul(w, inv(so)) : 8'h00;
            checks++;
            if (ev !== errs[job][p]) begin
              failures++;
              $display("job %0d ch %0d pos %0d: error value %h expected %h", job, c, p, ev, errs[job][p]);
            end
          end
          done++;
        end
      end
    end
  end

  initial begin
    cw_t cw;
    byte_t syn [16];
    init();
    for (int c = 0; c < NCH; c++) syn_in[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < NJOB; n++) begin
      automatic int ch = n % NCH;
      random_codeword(cw);
      add_errors(cw, (n < 9) ? n : $urandom_range(8, 0), errs[n]);
      for (int i = 0; i < 16; i++) syn[i] = syndrome(cw, i);
      job_ch[n] = ch;
      for (int b = 0; b < ((n % 2) ? 18 : 26); b++) begin
        in_start <= (b == 0);
        in_sel   <= 2'(ch);
        for (int c = 0; c < NCH; c++) syn_in[c] <= (c == ch && b < 16) ? syn[15 - b] : rnd_byte();
        @(posedge clk);
        if (b == 0) begin
          start_cyc[n] = cyc;
          q[ch].push_back(n);
        end
      end
      if (n == 11) repeat (30) @(posedge clk);   // idle gap
    end
    in_start <= 0;
    repeat (LAT + 20) @(posedge clk);
    checks++;
    if (done != NJOB) begin failures++; $display("%0d of %0d results", done, NJOB); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
