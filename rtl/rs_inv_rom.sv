// rs_inv_rom: 256 x 8 GF(2^8) inverse ROM used by the Forney division.
//
// The published architecture divides by the error locator derivative through a 256-entry ROM of
// field inverses. The contents are computed at elaboration from the field
// (inv[alpha^e] = alpha^(255-e)); inv[0] is 0, which only occurs where no error
// is located. Asynchronous read; the register behind it sits in the caller.
module rs_inv_rom
  import rs_gf_pkg::*;
(
  input  gf_t addr,
  output gf_t data
);
  localparam inv_table_t ROM = gf_inv_table();
  assign data = ROM[addr];
endmodule
