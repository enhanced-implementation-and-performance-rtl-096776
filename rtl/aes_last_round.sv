// aes_last_round: the 128-bit last round of AES-128.
//
// SubBytes on all sixteen bytes (sixteen S-box LUTs of its own), ShiftRows
// (wiring) and AddRoundKey with round key 10, given as four 32-bit words
// packed into 128 bits. There is no MixColumns in this round, as in FIPS-197.
// Purely combinational; the enclosing datapath writes the result into its
// round register.
module aes_last_round
  import aes_pkg::*;
(
  input  block_t din,
  input  block_t rkey,
  output block_t dout
);

  block_t subbed;

  for (genvar b = 0; b < 16; b++) begin : g_sbox
    aes_sbox u_sbox (.addr(din[8*b +: 8]), .data(subbed[8*b +: 8]));
  end

  assign dout = shift_rows(subbed) ^ rkey;

endmodule
