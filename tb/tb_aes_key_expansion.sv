// tb_aes_key_expansion: the on-the-fly key schedule. After load, rk_next
// must be round key 1 and, after each step, the following round key: checked
// for the FIPS-197 Appendix A.1 key (round keys 1 and 10 printed there) and
// for random keys against the reference expansion. Also checks that
// rk_next holds while neither load nor step is asserted.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, load = 0, step = 0;
  logic [127:0] key_in = '0, rk_next;
  int checks = 0, failures = 0;

  aes_key_expansion dut (.clk, .rst_n, .load, .key_in, .step, .rk_next);

  always #5 clk = ~clk;

  task automatic expect_rk(input logic [127:0] exp, input string what);
    checks++;
    if (rk_next !== exp) begin
      failures++;
      $display("FAIL %s: rk_next = %032h, expected %032h", what, rk_next, exp);
    end
  endtask

  task automatic run_key(input logic [127:0] key, input bit pause);
    @(negedge clk);
    key_in = key; load = 1;
    @(negedge clk);
    load = 0;
    for (int r = 1; r <= 10; r++) begin
      expect_rk(round_key(key, r), $sformatf("round %0d", r));
      if (pause) begin
        @(negedge clk);                       // idle clock: must hold
        expect_rk(round_key(key, r), $sformatf("round %0d held", r));
      end
      step = 1;
      @(negedge clk);
      step = 0;
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // FIPS-197 Appendix A.1: round keys 1 and 10
    @(negedge clk);
    key_in = FIPS_B_KEY; load = 1;
    @(negedge clk);
    load = 0;
    expect_rk(128'ha0fafe1788542cb123a339392a6c7605, "A.1 round key 1");
    repeat (9) begin step = 1; @(negedge clk); end
    step = 0;
    expect_rk(128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "A.1 round key 10");
    run_key(FIPS_C1_KEY, 1'b1);
    for (int i = 0; i < 20; i++) run_key(rand128(), i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
