// tb_aes_enc_core: the round datapath on the FIPS-197 known-answer vectors,
// the design's single-block example and random plaintext/key pairs checked
// against the reference model. Checks the latency (ciphertext valid 10
// clocks after the block is taken), that en low stretches it by exactly
// the clocks it was low, and that the result holds until ct_ready.
module tb_aes_enc_core;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, en = 1, blk_valid = 0, ct_ready = 0;
  logic         blk_ready, ct_valid, busy;
  logic [127:0] blk_data = '0, blk_key = '0, ct_data;
  int checks = 0, failures = 0;

  aes_enc_core dut (.clk, .rst_n, .en, .blk_valid, .blk_ready, .blk_data, .blk_key,
                    .ct_valid, .ct_ready, .ct_data, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic encrypt_one(input logic [127:0] pt, input logic [127:0] key,
                             input logic [127:0] exp, input int en_low, input int hold);
    int lat = 0;
    @(negedge clk);
    blk_valid = 1; blk_data = pt; blk_key = key;
    #1 check(blk_ready, "core idle takes block");
    @(negedge clk);
    blk_valid = 0; blk_data = '0; blk_key = '0;
    lat = 0;
    while (!ct_valid) begin
      en = !(lat >= 4 && lat < 4 + en_low);
      @(negedge clk);
      lat++;
    end
    en = 1;
    check(lat == 10 + en_low, $sformatf("latency %0d, expected %0d", lat, 10 + en_low));
    check(ct_data === exp, $sformatf("ct %032h, expected %032h", ct_data, exp));
    repeat (hold) begin
      @(negedge clk);
      check(ct_valid && ct_data === exp, "ciphertext held until taken");
    end
    ct_ready = 1;
    @(negedge clk);
    ct_ready = 0;
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    encrypt_one(FIPS_C1_PT, FIPS_C1_KEY, FIPS_C1_CT, 0, 0);
    encrypt_one(FIPS_B_PT,  FIPS_B_KEY,  FIPS_B_CT,  2, 3);
    encrypt_one(EX_PT,      EX_KEY,      EX_CT,      0, 1);
    for (int i = 0; i < 30; i++) begin
      automatic logic [127:0] p = rand128();
      automatic logic [127:0] k = rand128();
      encrypt_one(p, k, encrypt(p, k), i % 3, i % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
