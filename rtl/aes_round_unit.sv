// aes_round_unit: one 32-bit column of an intermediate AES round.
//
// It has 64 input bits (a 32-bit data packet and a 32-bit round-key word)
// and 32 output bits. The data packet is a column that has already been
// through ShiftRows, which the enclosing datapath does by wiring. Each of
// the four bytes goes through its own S-box LUT, the column through
// MixColumns, and the round-key word is XORed on (AddRoundKey).
// Four of these units work side by side on the four columns of the state.
// Purely combinational; the clocked register is the datapath's 128-bit
// round register.
module aes_round_unit
  import aes_pkg::*;
(
  input  word_t din,
  input  word_t rkey,
  output word_t dout
);

  word_t subbed;
  word_t mixed;

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    aes_sbox u_sbox (.addr(din[8*b +: 8]), .data(subbed[8*b +: 8]));
  end

  aes_mix_column u_mix (.din(subbed), .dout(mixed));

  assign dout = mixed ^ rkey;

endmodule
