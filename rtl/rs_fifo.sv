// rs_fifo: the FIFO structure that holds the received data of a channel group
// until its correction is ready.
//
// All NCH channels of a group are written together, one word of NCH*W data bits
// plus TAG_W tag bits per clock (12 bytes for four three-symbol channels),
// into a DEPTH-word circular buffer. Each channel has its own read port whose
// delay is BASE + k*STEP clocks for channel k, because the input buffer delays
// channel k by k*STEP before its decoder sees it. A read port returns the data
// written exactly that many clocks earlier (registered read). The tag bits
// (codeword valid/first) are forced to zero until the buffer has filled to the
// channel's delay, so no stale word is ever marked valid.
// The published architecture shows this FIFO but not its organisation; one shared memory with a
// read port per channel is this design's choice.
module rs_fifo #(
  parameter int unsigned NCH   = 4,
  parameter int unsigned W     = 24,
  parameter int unsigned TAG_W = 2,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned BASE  = 184,
  parameter int unsigned STEP  = 18
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     din  [NCH],
  input  logic [TAG_W-1:0] tag,
  output logic [W-1:0]     dout [NCH],
  output logic [TAG_W-1:0] tag_out [NCH]
);
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned MW  = NCH * W + TAG_W;
  localparam int unsigned MAXD = BASE + (NCH - 1) * STEP;

  logic [MW-1:0]  mem [DEPTH];
  logic [AW-1:0]  wptr;
  logic [AW:0]    fill;        // saturates at DEPTH
  logic [MW-1:0]  wword;

  always_comb begin
    wword = '0;
    for (int k = 0; k < NCH; k++) wword[k*W +: W] = din[k];
    wword[NCH*W +: TAG_W] = tag;
  end

  always_ff @(posedge clk) mem[wptr] <= wword;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      fill <= '0;
    end else begin
      wptr <= wptr + 1'b1;
      if (fill != (AW+1)'(DEPTH)) fill <= fill + 1'b1;
    end
  end

  for (genvar k = 0; k < NCH; k++) begin : g_rd
    localparam int unsigned D = BASE + k * STEP;
    logic [AW-1:0]      ra;
    logic [TAG_W+W-1:0] rword;
    logic               ok;
    assign ra = AW'(wptr + AW'(1) - AW'(D));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rword <= '0;
        ok    <= 1'b0;
      end else begin
        rword <= {mem[ra][NCH*W +: TAG_W], mem[ra][k*W +: W]};
        ok    <= (fill >= (AW+1)'(D - 1));
      end
    end
    assign dout[k]    = rword[W-1:0];
    assign tag_out[k] = ok ? rword[W +: TAG_W] : '0;
  end

  initial assert (MAXD <= DEPTH && BASE >= 2) else $error("rs_fifo: delays do not fit DEPTH");
endmodule
