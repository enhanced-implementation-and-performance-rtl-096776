// tb_aes128_enc_top: end-to-end test of the AES-128 encryptor at its
// default parameters.
//
// Blocks enter as four 32-bit plaintext/key packet pairs and leave as four
// 32-bit ciphertext packets. The first block (FIPS-197 C.1) runs with no
// back-pressure and checks the latency: the first ciphertext packet is
// valid 12 clocks after the fourth input packet was taken. The next blocks
// are FIPS-197 Appendix B, the design's single-block example (plaintext
// ...1e, key ...28) and random pairs checked against the reference model,
// with random input gaps, random out_ready random clocks with en low, and
// now and then a long pause of out_ready. The last blocks are sent back to
// back with no stalls and must come out one per 12 clocks.
// Each mechanism must occur at least once: input back-pressure, output
// back-pressure, the core holding a finished block for the output register,
// en freezing a block in progress, and loading the next block while the
// current one is in the rounds.
module tb_aes128_enc_top;
  import aes_ref_pkg::*;

  localparam int NBLK   = 200;
  localparam int NBURST = 8;     // last blocks, sent back to back
  localparam int BLOCK_INTERVAL = 12;

  logic        clk = 0, rst_n = 0, en = 1, in_valid = 0, out_ready = 0;
  logic        in_ready, out_valid, busy;
  logic [31:0] in_data = '0, in_key = '0, out_data;
  logic [127:0] exp_q [$];
  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_stall = 0, n_core_hold = 0, n_en_freeze = 0, n_overlap = 0;
  bit random_phase = 0;
  int cyc = 0;
  int t_first [NBLK];

  always @(posedge clk) cyc++;

  aes128_enc_top dut (.clk, .rst_n, .en, .in_valid, .in_ready, .in_data, .in_key,
                      .out_valid, .out_ready, .out_data, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled before each rising edge
  always @(negedge clk) if (rst_n) begin
    #2;
    if (in_valid && !in_ready)                          n_in_stall++;
    if (out_valid && !out_ready)                        n_out_stall++;
    if (dut.u_core.ct_valid && !dut.u_core.ct_ready)    n_core_hold++;
    if (!en && busy)                                    n_en_freeze++;
    if (in_valid && in_ready && busy)                   n_overlap++;
  end

  task automatic send_block(input logic [127:0] pt, input logic [127:0] key, input bit gaps);
    exp_q.push_back(encrypt(pt, key));
    for (int w = 0; w < 4; w++) begin
      if (gaps) while ($urandom_range(4) == 0) @(negedge clk);
      in_valid = 1;
      in_data  = pt [127-32*w -: 32];
      in_key   = key[127-32*w -: 32];
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  // en driver: random short freezes in the random phase
  initial begin
    forever begin
      @(negedge clk);
      en = !(random_phase && $urandom_range(9) == 0);
    end
  end

  // producer
  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency check: one block, no back-pressure
    out_ready = 1;
    send_block(FIPS_C1_PT, FIPS_C1_KEY, 1'b0);
    lat = 0;   // clocks since the fourth packet was taken
    while (!out_valid) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 12, $sformatf("latency %0d clocks, expected 12", lat));
    wait (exp_q.size() == 0);
    check(FIPS_C1_CT == encrypt(FIPS_C1_PT, FIPS_C1_KEY), "reference model on FIPS-197 C.1");
    check(EX_CT == encrypt(EX_PT, EX_KEY), "reference model on the example block");
    random_phase = 1;
    send_block(FIPS_B_PT, FIPS_B_KEY, 1'b1);
    send_block(EX_PT, EX_KEY, 1'b1);
    for (int b = 3; b < NBLK - NBURST; b++) send_block(rand128(), rand128(), 1'b1);
    // throughput: back-to-back blocks, no stalls
    random_phase = 0;
    for (int b = NBLK - NBURST; b < NBLK; b++) send_block(rand128(), rand128(), 1'b0);
  end

  // consumer
  initial begin
    logic [127:0] ct;
    automatic int nblk = 0;
    wait (rst_n);
    while (nblk < NBLK) begin
      for (int w = 0; w < 4; w++) begin
        forever begin
          @(negedge clk);
          out_ready = random_phase ? ($urandom_range(3) != 0) : 1'b1;
          // now and then a long pause, so that the core has to hold a result
          if (random_phase && $urandom_range(29) == 0) begin
            out_ready = 0;
            repeat ($urandom_range(30, 12)) @(negedge clk);
          end
          #1;
          if (out_valid && out_ready) break;
        end
        ct[127-32*w -: 32] = out_data;
        if (w == 0) t_first[nblk] = cyc;
      end
      check(exp_q.size() > 0, "ciphertext expected");
      check(ct === exp_q[0], $sformatf("block %0d: %032h, expected %032h", nblk, ct, exp_q[0]));
      void'(exp_q.pop_front());
      nblk++;
    end
    @(negedge clk);
    $display("blocks=%0d in_stall=%0d out_stall=%0d core_hold=%0d en_freeze=%0d overlap=%0d",
             nblk, n_in_stall, n_out_stall, n_core_hold, n_en_freeze, n_overlap);
    for (int b = NBLK - NBURST + 2; b < NBLK; b++)
      check(t_first[b] - t_first[b-1] == BLOCK_INTERVAL,
            $sformatf("blocks %0d and %0d %0d clocks apart, expected %0d",
                      b-1, b, t_first[b] - t_first[b-1], BLOCK_INTERVAL));
    check(n_in_stall  > 0, "input back-pressure never happened");
    check(n_out_stall > 0, "output back-pressure never happened");
    check(n_core_hold > 0, "core never held a finished block");
    check(n_en_freeze > 0, "en never froze a block in progress");
    check(n_overlap   > 0, "no block was loaded during the rounds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
