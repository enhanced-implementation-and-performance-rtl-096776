// tb_aes_packet_in: sends blocks as four 32-bit plaintext/key packet pairs
// with random gaps, takes the assembled blocks with random delays, and
// checks the words land most significant first and that in_ready drops
// while a complete block waits.
module tb_aes_packet_in;
  logic          clk = 0, rst_n = 0, in_valid = 0, blk_ready = 0;
  logic          in_ready, blk_valid;
  logic [31:0]   in_data = '0, in_key = '0;
  logic [127:0]  blk_data, blk_key;
  logic [127:0]  exp_d [$], exp_k [$];
  int checks = 0, failures = 0, stalls = 0, blocks = 0;

  aes_packet_in #(.PKT_W(32), .NPKT(4)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .in_key, .blk_valid, .blk_ready, .blk_data, .blk_key);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      automatic logic [127:0] d = {$urandom(), $urandom(), $urandom(), $urandom()};
      automatic logic [127:0] k = {$urandom(), $urandom(), $urandom(), $urandom()};
      exp_d.push_back(d);
      exp_k.push_back(k);
      for (int w = 0; w < 4; w++) begin
        while ($urandom_range(3) == 0) @(negedge clk);
        in_valid = 1;
        in_data  = d[127-32*w -: 32];
        in_key   = k[127-32*w -: 32];
        #1;
        while (!in_ready) begin
          stalls++;
          @(negedge clk);
          #1;
        end
        @(negedge clk);
        in_valid = 0;
      end
    end
  end

  // consumer
  initial begin
    wait (rst_n);
    while (blocks < 40) begin
      @(negedge clk);
      blk_ready = ($urandom_range(2) == 0);
      #1;
      if (blk_valid && blk_ready) begin
        checks++;
        if (blk_data !== exp_d[0] || blk_key !== exp_k[0]) begin
          failures++;
          $display("FAIL block %0d: %032h/%032h, expected %032h/%032h",
                   blocks, blk_data, blk_key, exp_d[0], exp_k[0]);
        end
        void'(exp_d.pop_front());
        void'(exp_k.pop_front());
        blocks++;
      end
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL in_ready never dropped");
    end
    $display("input stalls: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
