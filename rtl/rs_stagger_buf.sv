// rs_stagger_buf: input or output buffer of a four-channel group.
//
// A set of per-channel shift registers with staircase lengths. As input buffer
// (REVERSE = 0) channel k is delayed by k*STEP clocks, which phase-shifts the
// channels so that their syndrome sets reach the shared KES one after another.
// As output buffer (REVERSE = 1) channel k is delayed by (NCH-1-k)*STEP clocks,
// which lines the corrected channels up again. Channel 0 of the input buffer
// (and channel NCH-1 of the output buffer) has no register. The staircase is
// the published one; STEP = 18 clocks, one KES syndrome slot, is this design's choice.
module rs_stagger_buf #(
  parameter int unsigned NCH     = 4,
  parameter int unsigned W       = 24,
  parameter int unsigned STEP    = 18,
  parameter bit          REVERSE = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din  [NCH],
  output logic [W-1:0] dout [NCH]
);
  for (genvar k = 0; k < NCH; k++) begin : g_ch
    localparam int unsigned D = (REVERSE ? (NCH - 1 - k) : k) * STEP;
    if (D == 0) begin : g_thru
      assign dout[k] = din[k];
    end else begin : g_sr
      logic [W-1:0] sr [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) for (int i = 0; i < int'(D); i++) sr[i] <= '0;
        else begin
          sr[0] <= din[k];
          for (int i = 1; i < int'(D); i++) sr[i] <= sr[i-1];
        end
      end
      assign dout[k] = sr[D-1];
    end
  end
endmodule
