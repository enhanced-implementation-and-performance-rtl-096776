// aes_key_expansion: on-the-fly AES-128 key schedule, one round key per clock.
//
// Rather than expanding and storing all eleven round keys first, the unit
// keeps only the current round key (key_q) and the current round constant
// (rcon_q). From them it computes, combinationally, the next round key:
//   t  = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
//   n0 = w0 ^ t,  n1 = w1 ^ n0,  n2 = w2 ^ n1,  n3 = w3 ^ n2
// SubWord uses four S-box LUTs. rk_next is offered as four 32-bit words
// (n0 in bits 127:96) to the round being computed in the same clock.
//
// Timing: load (priority) copies key_in into key_q and sets rcon_q = 01.
// Each step then replaces key_q by rk_next and doubles rcon_q in GF(2^8).
// After load, rk_next is round key 1; after k steps it is round key k+1.
// Generating the keys alongside the rounds follows the design; keeping the
// round constant as a doubling register is this implementation's choice.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t key_in,
  input  logic   step,
  output block_t rk_next
);

  block_t key_q;
  byte_t  rcon_q;
  word_t  rot, sub, t;
  word_t  w0, w1, w2, w3, n0, n1, n2, n3;

  always_comb begin
    {w0, w1, w2, w3} = key_q;
    rot = {w3[23:0], w3[31:24]};
  end

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (.addr(rot[8*b +: 8]), .data(sub[8*b +: 8]));
  end

  always_comb begin
    t  = sub ^ {rcon_q, 24'h000000};
    n0 = w0 ^ t;
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
    rk_next = {n0, n1, n2, n3};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key_q  <= '0;
      rcon_q <= 8'h01;
    end else if (load) begin
      key_q  <= key_in;
      rcon_q <= 8'h01;
    end else if (step) begin
      key_q  <= rk_next;
      rcon_q <= xtime(rcon_q);
    end
  end

endmodule
