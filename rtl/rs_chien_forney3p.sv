// rs_chien_forney3p: three-parallel Chien search, Forney error value and error
// correction for one channel.
//
// Coefficients arrive from the KES as nine 16-bit beats {sigma_j, w_j},
// j = 0..8 (coef_valid). On load (from controller #3, the clock after the last
// beat) the Chien cells start; from the next clock on they sweep the 255
// positions three per clock, r254/r253/r252 first, for 85 clocks. Per lane:
//   even  = sigma_0 + sigma_2 x^2 + ... + sigma_8 x^8      (cells C0,C2,..,C8)
//   oddq  = sigma_1 + sigma_3 x^2 + sigma_5 x^4 + sigma_7 x^6 (cells C0..C6)
//   sodd  = x * oddq = x sigma'(x)                          (cell C1 on 1)
//   sigma(x) = even + sodd, zero-detected -> the position is in error
//   Y = w(x) / sodd(x)       (eq. (13); the sign vanishes in GF(2^8))
// with x = a^l. The division is an inverse ROM lookup and a multiplier.
// Pipeline, counted from the first clock t0 on which the cells hold a sweep:
//   t1 registers even/oddq/x, t3 sodd (2-stage multiplier), sigma and zero test,
//   t4 registered inverse, w(x) delayed to t4, t6 error value (2-stage
//   multiplier), zero flag delayed to t6. On t6, data_in (the received triple
//   from the FIFO, same lane order) is corrected and registered: corrected
//   output appears on t7 = load clock + 8. tag_in travels alongside data_in.
// The register counts on each path follow the published Chien/Forney diagram
// (three on sigma, one on the odd part, one after the ROM, four on w, three on
// the zero flag); the single multiplier that the published diagram draws twice for
// x sigma'(x) is shared here. err_loc flags the lanes corrected on each output.
module rs_chien_forney3p
  import rs_gf_pkg::*;
#(
  parameter int unsigned TAG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [15:0]      coef,
  input  logic             coef_valid,
  input  logic             coef_first,
  input  logic             load,
  input  sym3_t            data_in,
  input  logic [TAG_W-1:0] tag_in,
  output sym3_t            data_out,
  output logic [TAG_W-1:0] tag_out,
  output logic [2:0]       err_loc
);
  // ---------------- coefficient capture ----------------
  gf_t        sig_c [9];
  gf_t        omg_c [8];
  logic [3:0] bcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 9; j++) sig_c[j] <= '0;
      for (int j = 0; j < 8; j++) omg_c[j] <= '0;
      bcnt <= '0;
    end else if (coef_valid) begin
      logic [3:0] j;
      j = coef_first ? 4'd0 : bcnt;
      if (j < 9) sig_c[j] <= coef[15:8];
      if (j < 8) omg_c[j[2:0]] <= coef[7:0];
      bcnt <= j + 1'b1;
    end
  end

  // ---------------- Chien cells ----------------
  sym3_t ev_t [5];    // sigma_0, sigma_2, .., sigma_8 with C0, C2, .., C8
  sym3_t od_t [4];    // sigma_1, sigma_3, .., sigma_7 with C0, C2, .., C6
  sym3_t om_t [8];    // w_0 .. w_7 with C0 .. C7
  sym3_t x_t;         // C1 on the constant 1

  for (genvar m = 0; m < 5; m++) begin : g_even
    rs_chien_cell #(.K(2*m)) u_c (.clk, .rst_n, .load, .coef(sig_c[2*m]), .v(ev_t[m]));
  end
  for (genvar m = 0; m < 4; m++) begin : g_odd
    rs_chien_cell #(.K(2*m)) u_c (.clk, .rst_n, .load, .coef(sig_c[2*m+1]), .v(od_t[m]));
  end
  for (genvar m = 0; m < 8; m++) begin : g_omg
    rs_chien_cell #(.K(m)) u_c (.clk, .rst_n, .load, .coef(omg_c[m]), .v(om_t[m]));
  end
  rs_chien_cell #(.K(1)) u_cx (.clk, .rst_n, .load, .coef(8'h01), .v(x_t));

  // ---------------- per-lane evaluation and Forney ----------------
  sym3_t ev0, od0, om0;
  always_comb begin
    ev0 = '0; od0 = '0; om0 = '0;
    for (int m = 0; m < 5; m++) ev0 ^= ev_t[m];
    for (int m = 0; m < 4; m++) od0 ^= od_t[m];
    for (int m = 0; m < 8; m++) om0 ^= om_t[m];
  end

  sym3_t ev_d [1:3];          // even part, t1..t3
  sym3_t od1, x1;             // t1
  sym3_t om_d [1:4];          // w(x), t1..t4
  sym3_t sodd3;               // t3
  sym3_t inv3, inv4;          // t3 comb, t4
  sym3_t yv6;                 // t6
  logic [2:0] zero3;
  logic [2:0] zero_d [4:6];

  for (genvar l = 0; l < 3; l++) begin : g_lane
    gf_mul_pipe u_mx (.clk, .rst_n, .a(od1[l]), .b(x1[l]), .p(sodd3[l]));
    rs_inv_rom  u_rom (.addr(sodd3[l]), .data(inv3[l]));
    gf_mul_pipe u_my (.clk, .rst_n, .a(om_d[4][l]), .b(inv4[l]), .p(yv6[l]));
    assign zero3[l] = ((ev_d[3][l] ^ sodd3[l]) == 8'h00);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= 3; i++) ev_d[i] <= '0;
      for (int i = 1; i <= 4; i++) om_d[i] <= '0;
      for (int i = 4; i <= 6; i++) zero_d[i] <= '0;
      od1      <= '0;
      x1       <= '0;
      inv4     <= '0;
      data_out <= '0;
      tag_out  <= '0;
      err_loc  <= '0;
    end else begin
      ev_d[1] <= ev0;
      ev_d[2] <= ev_d[1];
      ev_d[3] <= ev_d[2];
      od1     <= od0;
      x1      <= x_t;
      om_d[1] <= om0;
      for (int i = 2; i <= 4; i++) om_d[i] <= om_d[i-1];
      inv4      <= inv3;
      zero_d[4] <= zero3;
      zero_d[5] <= zero_d[4];
      zero_d[6] <= zero_d[5];
      for (int l = 0; l < 3; l++)
        data_out[l] <= data_in[l] ^ (zero_d[6][l] ? yv6[l] : 8'h00);
      tag_out <= tag_in;
      err_loc <= zero_d[6];
    end
  end
endmodule
