// aes_ctrl: round sequencer of the AES-128 datapath (the enable block).
//
// Three states. IDLE: when en is high the controller accepts a block
// (blk_ready), which pulses load: the round register takes plaintext XOR key
// (the initial round) and the key expansion takes the cipher key. RUN: each
// clock with en high pulses step, one round; round counts 1..NR and last is
// high in round NR, selecting the last-round unit. DONE: ct_valid is high and
// the ciphertext is held in the round register until ct_ready.
//
// en low freezes IDLE and RUN (no load, no step), so a block in progress
// simply waits. Latency from load to ct_valid is NR clocks with en high.
// The states, their encoding and the handshakes are this design's own; the
// design only names an enable block that drives the round register and the
// key expansion.
module aes_ctrl #(
  parameter int unsigned NR = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic                       blk_valid,
  output logic                       blk_ready,
  output logic                       load,
  output logic                       step,
  output logic                       last,
  output logic                       ct_valid,
  input  logic                       ct_ready,
  output logic [$clog2(NR+1)-1:0]    round,
  output logic                       busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e                    state_q;
  logic [$clog2(NR+1)-1:0]   round_q;

  assign blk_ready = en && (state_q == S_IDLE);
  assign load      = blk_valid && blk_ready;
  assign step      = en && (state_q == S_RUN);
  assign last      = (round_q == ($clog2(NR+1))'(NR));
  assign ct_valid  = (state_q == S_DONE);
  assign round     = round_q;
  assign busy      = (state_q == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      round_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (load) begin
          state_q <= S_RUN;
          round_q <= ($clog2(NR+1))'(1);
        end
        S_RUN: if (step) begin
          if (last) state_q <= S_DONE;
          else      round_q <= round_q + 1'b1;
        end
        S_DONE: if (ct_ready) begin
          state_q <= S_IDLE;
          round_q <= '0;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
