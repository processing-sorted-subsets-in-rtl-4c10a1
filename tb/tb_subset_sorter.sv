// tb_subset_sorter: streams sets of random blocks (full and partial, with
// repeated values) into a small sorter and, after the final block of each
// set, compares the maximum and minimum subsets with a reference computed
// by sorting every item of the set in the testbench; short sets check the
// fill values. Also checks that each merge ends within (L+K)/2 + 1 clocks
// and that merged_last marks only the final block.
module tb_subset_sorter;
  import ssa_pkg::*;

  localparam int unsigned K = 8, LMAX = 5, LMIN = 6;
  localparam int unsigned BOUND = ((LMAX > LMIN ? LMAX : LMIN) + K) / 2 + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic                   init, blk_valid, blk_ready, blk_last, busy, merged, merged_last;
  item_t [K-1:0]          blk_items;
  logic [$clog2(K+1)-1:0] blk_count;
  item_t [LMAX-1:0]       max_set;
  item_t [LMIN-1:0]       min_set;
  int checks = 0, failures = 0;

  subset_sorter #(.K(K), .LMAX(LMAX), .LMIN(LMIN)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  item_t all [$];

  initial begin
    init = 0; blk_valid = 0; blk_last = 0; blk_items = '0; blk_count = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int set = 0; set < 40; set++) begin
      int nblk;
      nblk = (set % 4 == 0) ? 1 : $urandom_range(1, 12);
      all.delete();
      @(negedge clk);
      init = 1;
      @(negedge clk);
      init = 0;
      for (int b = 0; b < nblk; b++) begin
        int cyc;
        blk_count = (set % 3 == 0) ? K : $urandom_range(0, K);
        if (set % 4 == 0) blk_count = $urandom_range(1, 3);  // fewer items than L
        for (int i = 0; i < int'(K); i++) begin
          blk_items[i] = (set % 2 == 0) ? item_t'($urandom_range(0, 9)) : $urandom();
          if (i < int'(blk_count)) all.push_back(blk_items[i]);
        end
        blk_last  = (b == nblk - 1);
        blk_valid = 1;
        #1 check(blk_ready, $sformatf("ready when idle st=%0d init=%0b", dut.state_q, init));
        @(negedge clk);
        blk_valid = 0;
        blk_items = '1;   // the sorter must have copied the block
        cyc = 0;
        while (!merged && cyc < 1000) begin @(negedge clk); cyc++; end
        check(cyc <= int'(BOUND), $sformatf("merge took %0d clocks", cyc));
        check(merged_last == blk_last, "merged_last");
      end
      all.rsort();
      for (int i = 0; i < int'(LMAX); i++)
        check(max_set[i] == ((i < all.size()) ? all[i] : item_t'(0)),
              $sformatf("set %0d max[%0d]=%0d", set, i, max_set[i]));
      all.sort();
      for (int i = 0; i < int'(LMIN); i++)
        check(min_set[i] == ((i < all.size()) ? all[i] : '1),
              $sformatf("set %0d min[%0d]=%0d", set, i, min_set[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
