// tb_block_loader: feeds sets of random 64-bit beats (odd item counts use
// the lane mask of the final beat) through the loader with every filter
// mode, takes blocks with random delays, and checks that the blocks hold
// exactly the admitted items in arrival order (reference filter computed
// in the testbench), that no block exceeds K items, that only the final
// block carries blk_last, that a block is cut short only when the next
// beat would not fit or the set ended, and the ADMITTED count.
module tb_block_loader;
  import ssa_pkg::*;

  localparam int unsigned K = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic                   clear, use_lower, use_upper;
  item_t                  lower, upper;
  logic                   in_valid, in_ready, in_last;
  beat_t                  in_data;
  logic [LANES-1:0]       in_keep;
  logic                   blk_valid, blk_ready, blk_last;
  item_t [K-1:0]          blk_items;
  logic [$clog2(K+1)-1:0] blk_count;
  logic [31:0]            admitted;
  int checks = 0, failures = 0;
  int n_partial = 0;

  block_loader #(.K(K)) dut (.*);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  item_t exp_q [$];
  item_t got_q [$];
  bit    got_last;
  bit    set_done;

  function automatic bit admit_ref(item_t x);
    return (!use_lower || x >= lower) && (!use_upper || x <= upper);
  endfunction

  // sink: accepts blocks after a random delay
  initial begin
    blk_ready = 0;
    forever begin
      @(negedge clk);
      blk_ready = ($urandom_range(0, 2) == 0);
      #1;
      if (blk_valid && blk_ready) begin
        check(blk_count <= K, "count <= K");
        for (int i = 0; i < int'(blk_count); i++) got_q.push_back(blk_items[i]);
        if (blk_count < K && !blk_last) n_partial++;
        if (blk_last) set_done = 1;
        check(!got_last, "nothing after the last block");
        got_last = blk_last;
      end
    end
  end

  initial begin
    clear = 0; in_valid = 0; in_last = 0; in_data = '0; in_keep = '0;
    use_lower = 0; use_upper = 0; lower = '0; upper = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int set = 0; set < 48; set++) begin
      int nitems, sent, exp_adm;
      nitems = $urandom_range(1, 60);
      {use_lower, use_upper} = 2'(set % 4);
      lower = 32'd300; upper = 32'd700;
      exp_q.delete(); got_q.delete(); got_last = 0; set_done = 0; exp_adm = 0;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      sent = 0;
      while (sent < nitems) begin
        for (int l = 0; l < int'(LANES); l++) begin
          item_t x;
          x = item_t'($urandom_range(0, 1000));
          in_data[l*ITEM_W +: ITEM_W] = x;
          in_keep[l] = (sent + l < nitems);
          if (in_keep[l] && admit_ref(x)) begin exp_q.push_back(x); exp_adm++; end
        end
        in_last  = (sent + int'(LANES) >= nitems);
        in_valid = 1;
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        in_valid = 0;
        sent += int'(LANES);
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      while (!set_done) @(negedge clk);
      check(got_q.size() == exp_q.size(), $sformatf("set %0d: %0d items, expected %0d",
            set, got_q.size(), exp_q.size()));
      for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
        check(got_q[i] == exp_q[i], $sformatf("set %0d item %0d", set, i));
      check(admitted == 32'(exp_adm), "admitted count");
    end
    check(n_partial > 0, "a block was cut short by filtering");
    $display("partial blocks: %0d", n_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
