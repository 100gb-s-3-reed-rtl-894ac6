// tb_rs_inv_rom: reads all 256 ROM words and checks a * inv(a) = 1 (and
// inv(0) = 0) with the log/antilog reference.
module tb_rs_inv_rom;
  import rs_gf_pkg::gf_t;
  import rs_tb_pkg::*;

  gf_t addr = 0, data;
  int checks = 0, failures = 0;

  rs_inv_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int i = 0; i < 256; i++) begin
      addr = gf_t'(i);
      #1;
      checks++;
      if ((i == 0 && data !== 0) || (i != 0 && mul(gf_t'(i), data) !== 8'h01)) begin
        failures++; $display("inv(%h) = %h", i, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
