// tb_rs_stagger_buf: random words through an input buffer (delays 0, 18, 36,
// 54) and an output buffer (54, 36, 18, 0); checks every channel's delay and
// that the two in series give the same total delay on all channels.
module tb_rs_stagger_buf;
  localparam int NCH = 4, W = 24, STEP = 18;
  logic         clk = 0, rst_n = 0;
  logic [W-1:0] din [NCH], mid [NCH], dout [NCH];
  int checks = 0, failures = 0;
  logic [W-1:0] hist [NCH][int];

  rs_stagger_buf #(.NCH(NCH), .W(W), .STEP(STEP), .REVERSE(1'b0)) u_in  (.clk, .rst_n, .din(din), .dout(mid));
  rs_stagger_buf #(.NCH(NCH), .W(W), .STEP(STEP), .REVERSE(1'b1)) u_out (.clk, .rst_n, .din(mid), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NCH; k++) din[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int c = 0; c < 400; c++) begin
      #1;
      for (int k = 0; k < NCH; k++) begin
        din[k] = W'($urandom);
        hist[k][c] = din[k];
      end
      #1;
      for (int k = 0; k < NCH; k++) begin
        automatic int s1 = c - k * STEP;
        automatic int s2 = c - (NCH - 1) * STEP;
        checks++;
        if (mid[k] !== ((s1 >= 0) ? hist[k][s1] : '0)) begin failures++; $display("in ch %0d at %0d", k, c); end
        checks++;
        if (dout[k] !== ((s2 >= 0) ? hist[k][s2] : '0)) begin failures++; $display("out ch %0d at %0d", k, c); end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
