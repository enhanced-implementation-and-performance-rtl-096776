// tb_aes_mix_column: MixColumns of one column against the FIPS-197 worked
// example columns and random columns through the reference model.
module tb_aes_mix_column;
  import aes_ref_pkg::*;

  logic [31:0] din, dout;
  int checks = 0, failures = 0;

  aes_mix_column dut (.din, .dout);

  task automatic check(input logic [31:0] d, input logic [31:0] exp);
    din = d;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL mixcol(%08h) = %08h, expected %08h", d, dout, exp);
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
    // round 1 of FIPS-197 Appendix B, column 0, and common test columns
    check(32'hd4bf5d30, 32'h046681e5);
    check(32'hdb135345, 32'h8e4da1bc);
    check(32'hf20a225c, 32'h9fdc589d);
    check(32'h01010101, 32'h01010101);
    check(32'hc6c6c6c6, 32'hc6c6c6c6);
    check(32'hd4d4d4d5, 32'hd5d5d7d6);
    check(32'h2d26314c, 32'h4d7ebdf8);
    for (int i = 0; i < 500; i++) begin
      automatic logic [31:0] r = $urandom();
      check(r, mixcol(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
