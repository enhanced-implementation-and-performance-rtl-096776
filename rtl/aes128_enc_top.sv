// aes128_enc_top: AES-128 encryptor with 32-bit packet input and output.
//
// Plaintext and cipher key enter together as four 32-bit packets each
// (in_valid/in_ready, most significant word first) and are collected into
// two 128-bit registers. The round datapath then performs the initial
// AddRoundKey, nine intermediate rounds on four parallel 32-bit column
// units and the 128-bit last round, one round per clock, generating each
// round key on the fly. The ciphertext goes to an output register that hands
// it out as four 32-bit packets under the external control out_ready.
//
// en enables the round datapath and key expansion; with en low a block in
// progress holds. Timing with en high and no back-pressure: the fourth input
// packet is taken in clock 0, the block enters the round register in
// clock 1, the ciphertext is in the round register 10 clocks later and in the
// output register one clock after that, so the first output packet is
// valid 12 clocks after the last input packet was taken. The next block may
// be loaded while the current one is in the rounds.
module aes128_enc_top
  import aes_pkg::*;
#(
  parameter int unsigned PKT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [PKT_W-1:0]  in_data,
  input  logic [PKT_W-1:0]  in_key,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [PKT_W-1:0]  out_data,
  output logic              busy
);

  localparam int unsigned NPKT = BLOCK_W / PKT_W;

  logic   blk_valid, blk_ready;
  block_t blk_data, blk_key;
  logic   ct_valid, ct_ready;
  block_t ct_data;

  aes_packet_in #(.PKT_W(PKT_W), .NPKT(NPKT)) u_in (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_key,
    .blk_valid, .blk_ready, .blk_data, .blk_key
  );

  aes_enc_core u_core (
    .clk, .rst_n, .en,
    .blk_valid, .blk_ready, .blk_data, .blk_key,
    .ct_valid, .ct_ready, .ct_data,
    .busy
  );

  aes_packet_out #(.PKT_W(PKT_W), .NPKT(NPKT)) u_out (
    .clk, .rst_n,
    .ct_valid, .ct_ready, .ct_data,
    .out_valid, .out_ready, .out_data
  );

endmodule
