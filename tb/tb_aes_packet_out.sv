// tb_aes_packet_out: offers 128-bit words with random gaps, reads the
// 32-bit packets under a random out_ready, and checks order (most
// significant first), that a new word is refused until the last packet has
// gone, and that out_valid/out_data hold while out_ready is low.
module tb_aes_packet_out;
  logic          clk = 0, rst_n = 0, ct_valid = 0, out_ready = 0;
  logic          ct_ready, out_valid;
  logic [127:0]  ct_data = '0;
  logic [31:0]   out_data;
  logic [31:0]   exp_w [$];
  int checks = 0, failures = 0, holds = 0, words = 0;

  aes_packet_out #(.PKT_W(32), .NPKT(4)) dut (.clk, .rst_n, .ct_valid, .ct_ready, .ct_data,
    .out_valid, .out_ready, .out_data);

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
      while ($urandom_range(2) == 0) @(negedge clk);
      ct_valid = 1;
      ct_data  = d;
      #1;
      while (!ct_ready) begin
        @(negedge clk);
        #1;
      end
      for (int w = 0; w < 4; w++) exp_w.push_back(d[127-32*w -: 32]);
      @(negedge clk);
      ct_valid = 0;
    end
  end

  // consumer
  initial begin
    logic [31:0] held;
    automatic logic was_held = 0;
    wait (rst_n);
    while (words < 160) begin
      @(negedge clk);
      if (was_held) begin
        checks++;
        if (!out_valid || out_data !== held) begin
          failures++;
          $display("FAIL packet changed while out_ready low");
        end
      end
      out_ready = ($urandom_range(2) != 0);
      #1;
      was_held = out_valid && !out_ready;
      held     = out_data;
      if (was_held) holds++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== exp_w[0]) begin
          failures++;
          $display("FAIL packet %0d: %08h, expected %08h", words, out_data, exp_w[0]);
        end
        void'(exp_w.pop_front());
        words++;
      end
    end
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL out_ready never held a packet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
