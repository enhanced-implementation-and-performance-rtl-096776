// aes_enc_core: iterative AES-128 encryption datapath, one round per clock.
//
// A 128-bit round register holds the state. When a block is taken it is
// loaded with plaintext XOR cipher key (the initial AddRoundKey). In each of
// rounds 1..9 the register is cut into four 32-bit packets, packet i being
// column i of ShiftRows(state) (a fixed byte wiring), and four round units
// transform the packets in parallel (SubBytes, MixColumns, AddRoundKey with
// word i of the round key); their outputs are written back. In round 10 the
// 128-bit last-round unit (SubBytes, ShiftRows, AddRoundKey) writes instead.
// The key expansion produces each round key in the same clock as the round
// that uses it, so no key storage is needed.
//
// Interface: blk_valid/blk_ready take plaintext and key; ct_valid/ct_ready
// return the ciphertext, held in the round register until taken. en gates
// the whole datapath. Timing: ct_valid rises NR clocks after the block is
// taken (en high throughout). The parallel 32-bit column units, the
// feedback over rounds 1..9, the separate last round and on-the-fly key
// expansion follow the design; the handshakes are this design's choice.
module aes_enc_core
  import aes_pkg::*;
#(
  parameter int unsigned NR = AES128_NR
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   blk_valid,
  output logic   blk_ready,
  input  block_t blk_data,
  input  block_t blk_key,
  output logic   ct_valid,
  input  logic   ct_ready,
  output block_t ct_data,
  output logic   busy
);

  logic   load, step, last;
  block_t state_q;
  block_t shifted;
  block_t round_out;
  block_t last_out;
  block_t rk_next;

  aes_ctrl #(.NR(NR)) u_ctrl (
    .clk, .rst_n, .en,
    .blk_valid, .blk_ready,
    .load, .step, .last,
    .ct_valid, .ct_ready,
    .round(), .busy
  );

  aes_key_expansion u_keyexp (
    .clk, .rst_n,
    .load, .key_in(blk_key),
    .step,
    .rk_next
  );

  assign shifted = shift_rows(state_q);

  for (genvar c = 0; c < NB; c++) begin : g_col
    aes_round_unit u_round (
      .din (shifted  [BLOCK_W-1-WORD_W*c -: WORD_W]),
      .rkey(rk_next  [BLOCK_W-1-WORD_W*c -: WORD_W]),
      .dout(round_out[BLOCK_W-1-WORD_W*c -: WORD_W])
    );
  end

  aes_last_round u_last (
    .din (state_q),
    .rkey(rk_next),
    .dout(last_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)     state_q <= '0;
    else if (load)  state_q <= blk_data ^ blk_key;
    else if (step)  state_q <= last ? last_out : round_out;
  end

  assign ct_data = state_q;

endmodule
