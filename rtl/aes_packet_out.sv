// aes_packet_out: ciphertext output register, emptied 32 bits at a time.
//
// When empty it takes a 128-bit ciphertext (ct_valid && ct_ready) and then
// offers it as NPKT packets of PKT_W bits, most significant word first, on
// out_valid/out_ready. out_ready is the external control signal: each clock
// it is high while out_valid is high, one packet is consumed and the
// register shifts up by one word. ct_ready is high only when the register is
// empty, so a new ciphertext is taken in the clock after the last packet.
// Splitting the ciphertext into four 32-bit packets under external control
// follows the design; the word order and the handshake are this design's.
module aes_packet_out #(
  parameter int unsigned PKT_W = 32,
  parameter int unsigned NPKT  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ct_valid,
  output logic                    ct_ready,
  input  logic [PKT_W*NPKT-1:0]   ct_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [PKT_W-1:0]        out_data
);

  localparam int unsigned CW = $clog2(NPKT+1);

  logic [CW-1:0]            left_q;   // packets still to hand out
  logic [PKT_W*NPKT-1:0]    buf_q;

  assign ct_ready  = (left_q == '0);
  assign out_valid = (left_q != '0);
  assign out_data  = buf_q[PKT_W*NPKT-1 -: PKT_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left_q <= '0;
      buf_q  <= '0;
    end else if (ct_ready) begin
      if (ct_valid) begin
        buf_q  <= ct_data;
        left_q <= CW'(NPKT);
      end
    end else if (out_ready) begin
      buf_q  <= {buf_q[PKT_W*(NPKT-1)-1:0], PKT_W'(0)};
      left_q <= left_q - 1'b1;
    end
  end

  // a packet on offer must not change before it is taken
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
