// aes_packet_in: plaintext and key input registers, filled 32 bits at a time.
//
// Each accepted clock (in_valid && in_ready) shifts one plaintext packet into
// a 128-bit data register and, in the same clock, one key packet into a
// 128-bit key register. The first packet ends up in the most significant
// word (AES column 0). After NPKT packets the block is offered on
// blk_valid/blk_ready; in_ready is low while a full block waits, and the
// register may start filling again in the clock after the block is taken.
// Packing plaintext and key as four 32-bit packets each follows the design;
// the word order and the handshakes are this design's choice.
module aes_packet_in #(
  parameter int unsigned PKT_W = 32,
  parameter int unsigned NPKT  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [PKT_W-1:0]        in_data,
  input  logic [PKT_W-1:0]        in_key,
  output logic                    blk_valid,
  input  logic                    blk_ready,
  output logic [PKT_W*NPKT-1:0]   blk_data,
  output logic [PKT_W*NPKT-1:0]   blk_key
);

  localparam int unsigned CW = $clog2(NPKT+1);

  logic [CW-1:0]            cnt_q;
  logic [PKT_W*NPKT-1:0]    data_q, key_q;

  assign blk_valid = (cnt_q == CW'(NPKT));
  assign in_ready  = !blk_valid;
  assign blk_data  = data_q;
  assign blk_key   = key_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      data_q <= '0;
      key_q  <= '0;
    end else if (blk_valid) begin
      if (blk_ready) cnt_q <= '0;
    end else if (in_valid) begin
      data_q <= {data_q[PKT_W*(NPKT-1)-1:0], in_data};
      key_q  <= {key_q [PKT_W*(NPKT-1)-1:0], in_key};
      cnt_q  <= cnt_q + 1'b1;
    end
  end

  // a block on offer must not change before it is taken
  a_blk_stable: assert property (@(posedge clk) disable iff (!rst_n)
    blk_valid && !blk_ready |=> blk_valid && $stable(blk_data) && $stable(blk_key));

endmodule
