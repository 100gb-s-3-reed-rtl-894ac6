// tb_gf_mul_pipe: random and corner operands through the pipelined multiplier,
// one pair per clock; checks each product exactly two clocks later against a
// log/antilog reference.
module tb_gf_mul_pipe;
  import rs_gf_pkg::gf_t;
  import rs_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  gf_t  a = 0, b = 0, p;
  int checks = 0, failures = 0;
  gf_t  ea [$], eb [$];

  gf_mul_pipe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1200; i++) begin
      automatic gf_t na = (i < 256) ? gf_t'(i) : rnd_byte();
      automatic gf_t nb = (i < 256) ? gf_t'(255 - i) : rnd_byte();
      if (i % 97 == 0) nb = 0;
      a <= na; b <= nb;
      ea.push_back(na); eb.push_back(nb);
      @(posedge clk);
      #1;
      if (ea.size() == 2) begin
        automatic gf_t xa = ea.pop_front();
        automatic gf_t xb = eb.pop_front();
        checks++;
        if (p !== mul(xa, xb)) begin
          failures++; $display("%h * %h = %h expected %h", xa, xb, p, mul(xa, xb));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
