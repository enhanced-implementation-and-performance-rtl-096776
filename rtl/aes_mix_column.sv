// aes_mix_column: MixColumns of one 32-bit column.
//
// The column (a0 a1 a2 a3), a0 in bits 31:24, is multiplied by the circulant
// matrix with first row (02 03 01 01) over GF(2^8). Multiplication by 02 is
// xtime(); by 03 is xtime(a) ^ a; the rest is XOR. Purely combinational.
// The matrix and field are those of FIPS-197; the design only states that
// this step is GF(2^8) multiplication and XOR inside each 32-bit unit.
module aes_mix_column
  import aes_pkg::*;
(
  input  word_t din,
  output word_t dout
);

  byte_t a0, a1, a2, a3;
  byte_t x0, x1, x2, x3;   // xtime of each byte

  always_comb begin
    {a0, a1, a2, a3} = din;
    x0 = xtime(a0);
    x1 = xtime(a1);
    x2 = xtime(a2);
    x3 = xtime(a3);
    dout = { x0 ^ (x1 ^ a1) ^ a2 ^ a3,
             a0 ^ x1 ^ (x2 ^ a2) ^ a3,
             a0 ^ a1 ^ x2 ^ (x3 ^ a3),
             (x0 ^ a0) ^ a1 ^ a2 ^ x3 };
  end

endmodule
