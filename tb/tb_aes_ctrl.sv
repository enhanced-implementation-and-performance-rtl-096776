// tb_aes_ctrl: the round sequencer. Checks that a block is taken only in
// IDLE with en high, that exactly NR step pulses follow with last high on
// the NR-th, that en low stops stepping, that ct_valid holds until
// ct_ready, and that a new block is refused while busy.
module tb_aes_ctrl;
  localparam int unsigned NR = 10;

  logic clk = 0, rst_n = 0, en = 0, blk_valid = 0, ct_ready = 0;
  logic blk_ready, load, step, last, ct_valid, busy;
  logic [$clog2(NR+1)-1:0] round;
  int checks = 0, failures = 0;

  aes_ctrl #(.NR(NR)) dut (.clk, .rst_n, .en, .blk_valid, .blk_ready, .load, .step,
                           .last, .ct_valid, .ct_ready, .round, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // one block; returns the clocks from load to ct_valid
  task automatic one_block(input int pause_at, input int hold_cycles, output int lat);
    int steps = 0;
    lat = 0;
    @(negedge clk);
    blk_valid = 1; en = 1;
    #1 check(load, "load when idle and enabled");
    @(negedge clk);
    blk_valid = 0;
    while (!ct_valid) begin
      if (lat == pause_at) begin
        en = 0;
        #1 check(!step && !blk_ready, "no step, no new block with en low");
        @(negedge clk);
        en = 1;
      end
      #1;
      check(!blk_ready, "no new block while busy");
      if (step) begin
        steps++;
        check(round == ($clog2(NR+1))'(steps), "round count");
        check(last == (steps == NR), "last only in round NR");
      end
      @(negedge clk);
      lat++;
    end
    check(steps == NR, "NR steps per block");
    repeat (hold_cycles) begin
      check(ct_valid && !step, "result held until taken");
      @(negedge clk);
    end
    ct_ready = 1;
    @(negedge clk);
    ct_ready = 0;
    check(!ct_valid && blk_ready, "back to idle after result taken");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    blk_valid = 1; en = 0;
    #1 check(!load && !blk_ready, "no load with en low");
    one_block(-1, 0, lat);
    check(lat == NR, $sformatf("latency %0d, expected %0d", lat, NR));
    one_block(3, 4, lat);
    check(lat == NR, $sformatf("latency with pause %0d, expected %0d", lat, NR));
    one_block(-1, 1, lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
