// tb_aes_last_round: the 128-bit last round (SubBytes, ShiftRows,
// AddRoundKey, no MixColumns) against FIPS-197 Appendix B round 10 and
// random states through the reference model.
module tb_aes_last_round;
  import aes_ref_pkg::*;

  logic [127:0] din, rkey, dout;
  int checks = 0, failures = 0;

  aes_last_round dut (.din, .rkey, .dout);

  task automatic check(input logic [127:0] d, input logic [127:0] k, input logic [127:0] exp);
    din  = d;
    rkey = k;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL last(%032h) = %032h, expected %032h", d, dout, exp);
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
    // Appendix B: start of round 10, round key 10, output
    check(128'heb40f21e592e38848ba113e71bc342d2, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6,
          128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 300; i++) begin
      automatic logic [127:0] d = rand128();
      automatic logic [127:0] k = rand128();
      check(d, k, shift_rows(sub_bytes(d)) ^ k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
