// tb_accel_fsm: plays the datapath around the control FSM with random
// delays and checks the order of its outputs: init and rd_start together
// in the cycle after start, wr_start exactly when the last merge is
// reported, done one cycle after wr_done, busy over the whole operation,
// the empty-set shortcut, and that cycles equals the measured length.
module tb_accel_fsm;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic        start, init, rd_start, merged_last, wr_start, wr_done, busy, done;
  logic        copy, blk_valid, blk_last, copy_accept;
  logic [31:0] n_words, cycles, blk_count, copied;
  int checks = 0, failures = 0;

  accel_fsm dut (.*);

  int busy_cycles = 0;   // independent count of the busy cycles
  always @(posedge clk) if (start) busy_cycles <= 0; else if (busy) busy_cycles <= busy_cycles + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    start = 0; merged_last = 0; wr_done = 0; n_words = 0;
    copy = 0; blk_valid = 0; blk_last = 0; blk_count = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int len, d;
      n_words = (t % 5 == 0) ? 0 : $urandom_range(1, 1000);
      check(!busy, "idle");
      start = 1; @(negedge clk); start = 0;
      len = 1;
      check(busy && init, "init after start");
      check(rd_start == (n_words != 0), "rd_start with init");
      if (n_words != 0) begin
        @(negedge clk); len++;
        d = $urandom_range(0, 20);
        repeat (d) begin
          check(busy && !wr_start && !init && !rd_start, "waiting for merges");
          @(negedge clk); len++;
        end
        merged_last = 1; #1;
        check(wr_start, "wr_start on last merge");
        @(negedge clk); len++;
        merged_last = 0;
      end else begin
        check(wr_start, "empty set goes straight to write");
        @(negedge clk); len++;
      end
      d = $urandom_range(0, 20);
      repeat (d) begin
        check(busy && !done && !wr_start, "writing");
        @(negedge clk); len++;
      end
      wr_done = 1; @(negedge clk); wr_done = 0;
      check(done && busy, "done after wr_done");
      @(negedge clk);
      check(!busy && !done, "back to idle");
      check(cycles == 32'(busy_cycles) && busy_cycles == len + 1,
            $sformatf("cycles %0d expected %0d (%0d)", cycles, busy_cycles, len + 1));
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    // copy mode: each block is written where the previous one ended
    copy = 1;
    for (int t = 0; t < 20; t++) begin
      int nblk, total;
      n_words = (t % 6 == 0) ? 0 : 100;
      start = 1; @(negedge clk); start = 0;
      check(init && rd_start == (n_words != 0), "copy: init");
      @(negedge clk);
      nblk = (n_words == 0) ? 0 : $urandom_range(1, 5);
      total = 0;
      for (int b = 0; b < nblk; b++) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        blk_valid = 1; blk_count = (b % 3 == 2) ? 0 : $urandom_range(1, 8);
        blk_last = (b == nblk - 1);
        #1;
        check(copied == 32'(total), $sformatf("copied %0d expected %0d", copied, total));
        if (blk_count != 0) begin
          check(wr_start && !copy_accept, "copy: write starts");
          @(negedge clk);
          repeat ($urandom_range(0, 4)) begin
            check(!wr_start && !copy_accept, "copy: waiting for write");
            @(negedge clk);
          end
          wr_done = 1; #1;
        end
        check(copy_accept, "copy: block accepted");
        @(negedge clk);
        wr_done = 0; blk_valid = 0;
        total += int'(blk_count);
      end
      if (n_words != 0) check(done, "copy: done after last block");
      else begin check(done && !wr_start, "copy: empty set"); end
      @(negedge clk);
      check(!busy, "copy: idle");
      if (n_words != 0) check(copied == 32'(total), "copy: total");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
