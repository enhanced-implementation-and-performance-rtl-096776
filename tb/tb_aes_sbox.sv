// tb_aes_sbox: checks all 256 entries of the S-box LUT against the
// reference model's S-box and four FIPS-197 table entries.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] addr, data;
  int checks = 0, failures = 0;

  aes_sbox dut (.addr, .data);

  task automatic check(input logic [7:0] a, input logic [7:0] exp);
    addr = a;
    #1;
    checks++;
    if (data !== exp) begin
      failures++;
      $display("FAIL sbox[%02h] = %02h, expected %02h", a, data, exp);
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
    check(8'h00, 8'h63);
    check(8'h01, 8'h7c);
    check(8'h53, 8'hed);
    check(8'hff, 8'h16);
    for (int i = 0; i < 256; i++) check(8'(i), sbox(8'(i)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
