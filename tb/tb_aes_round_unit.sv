// tb_aes_round_unit: one 32-bit round column (SubBytes, MixColumns,
// AddRoundKey) against the FIPS-197 Appendix B example and random columns.
module tb_aes_round_unit;
  import aes_ref_pkg::*;

  logic [31:0] din, rkey, dout;
  int checks = 0, failures = 0;

  aes_round_unit dut (.din, .rkey, .dout);

  task automatic check(input logic [31:0] d, input logic [31:0] k, input logic [31:0] exp);
    din  = d;
    rkey = k;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL unit(%08h,%08h) = %08h, expected %08h", d, k, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 Appendix B, round 1, column 0: bytes 19 f4 8d 08 after
    // ShiftRows, round key word a0fafe17, start of round 2 a49c7ff2
    check(32'h19f48d08, 32'ha0fafe17, 32'ha49c7ff2);
    for (int i = 0; i < 500; i++) begin
      automatic logic [31:0] d = $urandom();
      automatic logic [31:0] k = $urandom();
      logic [31:0] s;
      s = {sbox(d[31:24]), sbox(d[23:16]), sbox(d[15:8]), sbox(d[7:0])};
      check(d, k, mixcol(s) ^ k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
