// tb_rs_fifo: writes a random word every clock and checks that each channel's
// read port returns its slice exactly BASE + k*STEP clocks later, and that the
// tag stays zero until the buffer has filled to that depth.
module tb_rs_fifo;
  localparam int NCH = 4, W = 24, TW = 2, BASE = 184, STEP = 18;
  logic          clk = 0, rst_n = 0;
  logic [W-1:0]  din [NCH], dout [NCH];
  logic [TW-1:0] tag = 0, tag_out [NCH];
  int checks = 0, failures = 0, cyc = 0;
  logic [W-1:0]  hist_d [NCH][int];
  logic [TW-1:0] hist_t [int];

  rs_fifo #(.NCH(NCH), .W(W), .TAG_W(TW), .DEPTH(256), .BASE(BASE), .STEP(STEP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NCH; k++) din[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 1000; cyc++) begin
      for (int k = 0; k < NCH; k++) begin
        din[k] <= W'($urandom);
        hist_d[k][cyc] = 'x;
      end
      tag <= TW'($urandom) | 2'b10;
      @(posedge clk);
      for (int k = 0; k < NCH; k++) hist_d[k][cyc] = din[k];
      hist_t[cyc] = tag;
      #1;
      for (int k = 0; k < NCH; k++) begin
        automatic int src = cyc + 1 - (BASE + k * STEP);
        checks++;
        if (src < 0) begin
          if (tag_out[k] !== 0) begin failures++; $display("ch %0d: tag before fill at %0d", k, cyc); end
        end else if (dout[k] !== hist_d[k][src] || tag_out[k] !== hist_t[src]) begin
          failures++; $display("ch %0d at %0d: %h/%b expected %h/%b", k, cyc, dout[k], tag_out[k], hist_d[k][src], hist_t[src]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
