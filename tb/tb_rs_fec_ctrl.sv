// tb_rs_fec_ctrl: checks the controller strobes against the schedule
// worked out from the channel offsets (syndrome start at k*18, KES slot at
// 86 + k*18, Chien load at 177 + k*18 clocks after each frame start, all
// modulo 85), over several frames, including a late frame_start that must
// resynchronise the counter.
module tb_rs_fec_ctrl;
  logic       clk = 0, rst_n = 0, frame_start = 0;
  logic [3:0] syn_first, chien_load;
  logic       kes_start;
  logic [1:0] kes_sel;
  int checks = 0, failures = 0;

  rs_fec_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int phase = -1;     // clocks since the last frame start, modulo 85
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) begin
      @(posedge clk); #1;
      checks++;
      if (syn_first != 0 || kes_start || chien_load != 0) begin failures++; $display("strobe before start"); end
    end
    for (int c = 0; c < 900; c++) begin
      #1;
      frame_start = (c == 0) || (c == 500);
      if (frame_start) phase = 0;
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (syn_first[k] !== (phase == (k * 18) % 85)) begin failures++; $display("syn_first[%0d] at phase %0d", k, phase); end
        checks++;
        if (chien_load[k] !== (phase == (177 + k * 18) % 85)) begin failures++; $display("chien_load[%0d] at phase %0d", k, phase); end
        if (phase == (86 + k * 18) % 85) begin
          checks++;
          if (!kes_start || kes_sel !== 2'(k)) begin failures++; $display("KES slot %0d missing", k); end
        end
      end
      checks++;
      if (kes_start && !(phase % 18 == 1 && phase < 72)) begin failures++; $display("stray kes_start at %0d", phase); end
      @(posedge clk);
      phase = (phase + 1) % 85;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
