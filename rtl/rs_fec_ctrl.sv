// rs_fec_ctrl: controllers #1 to #3 of a four-channel group.
//
// Every codeword occupies 85 clocks, so the whole group runs on one free
// counter (0..84) that frame_start (first triple of a codeword on the group's
// inputs) resets to 0 and that keeps running after the first frame_start.
// All strobes are fixed offsets from it, with channel k shifted by k*STEP
// clocks by the input buffer:
//   #1 syn_first[k]   clock of channel k's first triple at its syndrome block
//                     (offset k*STEP)
//   #2 kes_start/sel  clock on which channel k's S15 leaves its syndrome block
//                     (offset 1 + k*STEP, i.e. 86 clocks after its codeword
//                     started, modulo 85)
//   #3 chien_load[k]  clock after channel k's ninth KES coefficient beat
//                     (offset 85 + 1 + KES_LAT + 9 + k*STEP, modulo 85)
// The published architecture names the three controllers and draws the resulting schedule;
// counter-based generation is this design's choice.
module rs_fec_ctrl #(
  parameter int unsigned NCH     = 4,
  parameter int unsigned STEP    = 18,
  parameter int unsigned KES_LAT = 82
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   frame_start,
  output logic [NCH-1:0]         syn_first,
  output logic                   kes_start,
  output logic [$clog2(NCH)-1:0] kes_sel,
  output logic [NCH-1:0]         chien_load
);
  localparam int unsigned CYC       = 85;
  localparam int unsigned CHIEN_OFS = CYC + 1 + KES_LAT + 9;

  logic [6:0] cnt_q, cur;
  logic       run_q, act;

  assign cur     = frame_start ? 7'd0 : cnt_q;
  assign act     = frame_start | run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      run_q <= 1'b0;
    end else begin
      run_q <= act;
      cnt_q <= (cur == 7'(CYC - 1)) ? 7'd0 : cur + 1'b1;
    end
  end

  always_comb begin
    kes_start = 1'b0;
    kes_sel   = '0;
    for (int k = 0; k < NCH; k++) begin
      syn_first[k]  = act && (cur == 7'((k * STEP) % CYC));
      chien_load[k] = act && (cur == 7'((CHIEN_OFS + k * STEP) % CYC));
      if (act && cur == 7'((1 + k * STEP) % CYC)) begin
        kes_start = 1'b1;
        kes_sel   = ($clog2(NCH))'(k);
      end
    end
  end

  initial assert (NCH * STEP <= CYC && STEP >= 18)
    else $error("rs_fec_ctrl: channel slots do not fit one codeword period");
endmodule
