// aes_sbox: the SubBytes look-up table, 256 entries of 8 bits.
//
// The table is a constant array filled at elaboration by
// aes_pkg::build_sbox_table(), which evaluates the FIPS-197 S-box definition
// (GF(2^8) inverse, then the affine map with constant 0x63). Reading it is a
// pure table look-up: addr selects one of the 256 bytes, with no clock, so
// the read is combinational. A LUT of this size is what the design calls for;
// the read being asynchronous is this design's choice.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t addr,
  output byte_t data
);

  localparam sbox_table_t TABLE = build_sbox_table();

  assign data = TABLE[addr];

endmodule
