// tb_sorted_subset_accel_full: the top at its default sizes (blocks of 256
// items, subsets of up to 256) on the workload of the reference
// experiments: 65,536 random non-negative 32-bit integers (256 KB) placed
// in the DDR model once, then processed repeatedly. The processor side
// requests the L largest and L smallest items for L = 32, 64, ... 256 (128
// to 1024 bytes), and finally the 256 largest and smallest of the items
// inside a pair of bounds. Each result in the DDR model is compared with a
// reference sort; the cycle count from the CYCLES register is printed and
// checked against the bound implied by the sorter's merge time.
module tb_sorted_subset_accel_full;
  import ssa_pkg::*;

  localparam int unsigned N     = 65536;
  localparam int unsigned L     = 256;
  localparam int unsigned DEPTH = 65536;          // 512 KB of model memory
  localparam logic [31:0] SRC = 32'h0000_0000, DST = 32'h0004_0000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  axil_req_t   gp_req, pci_req;
  axil_rsp_t   gp_rsp, pci_rsp;
  axi_hp_req_t hp_req;
  axi_hp_rsp_t hp_rsp;
  logic        irq_done, irq_doorbell, host_flag;
  int n_rd_bursts, n_wr_bursts, n_stalls, n_bad_bursts;
  int checks = 0, failures = 0;
  int blocks = 0;

  sorted_subset_accel dut (.*);
  axi_hp_mem_model #(.DEPTH(DEPTH)) u_mem (.clk, .rst_n, .req(hp_req), .rsp(hp_rsp),
    .n_rd_bursts, .n_wr_bursts, .n_stalls, .n_bad_bursts);
  axil_bfm u_ps (.clk, .req(gp_req), .rsp(gp_rsp));

  assign pci_req = '0;

  always @(posedge clk) if (dut.blk_valid && dut.blk_ready) blocks++;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic item_t mem_word(logic [31:0] byte_addr);
    beat_t b;
    b = u_mem.mem[(byte_addr >> 3) % DEPTH];
    return byte_addr[2] ? b[63:32] : b[31:0];
  endfunction

  item_t set_a [$];
  item_t desc [$];
  item_t asc  [$];
  logic [31:0] rd;

  // One operation on the set already in memory: subsets of lsize items,
  // optionally only from items inside [lo, hi].
  task automatic run_op(int lsize, bit filt, item_t lo, item_t hi);
    item_t adm [$];
    int blocks_before;
    for (int i = 0; i <= int'(L); i++) u_mem.mem[(DST >> 3) + i] = '0;
    foreach (set_a[i]) if (!filt || (set_a[i] >= lo && set_a[i] <= hi)) adm.push_back(set_a[i]);
    u_ps.write({26'd0, REG_LMAX},  32'(lsize));
    u_ps.write({26'd0, REG_LMIN},  32'(lsize));
    u_ps.write({26'd0, REG_LOWER}, lo);
    u_ps.write({26'd0, REG_UPPER}, hi);
    u_ps.write({26'd0, REG_MODE},  {30'd0, filt, filt});
    blocks_before = blocks;
    u_ps.write({26'd0, REG_CTRL},  32'h1);
    while (!irq_done) @(negedge clk);
    u_ps.write({26'd0, REG_CTRL},  32'h2);
    u_ps.read({26'd0, REG_ADMITTED}, rd);
    check(rd == 32'(adm.size()), $sformatf("admitted %0d expected %0d", rd, adm.size()));
    u_ps.read({26'd0, REG_CYCLES}, rd);
    $display("L=%0d filter=%0b: %0d items admitted, %0d blocks, %0d cycles",
             lsize, filt, adm.size(), blocks - blocks_before, rd);
    if (!filt) check(blocks - blocks_before == int'(N) / 256, "block count");
    // unfiltered, merging dominates: per block a handoff plus at most
    // (L+K)/2 + 1 merge clocks; filtered, reading every beat can dominate
    if (!filt) check(rd <= 32'((blocks - blocks_before) * ((L + 256) / 2 + 3) + 2000), "cycle bound");
    else       check(rd <= 32'(2 * int'(N) / 2 + (blocks - blocks_before) * ((L + 256) / 2 + 3)),
                     "cycle bound");
    adm.rsort();
    for (int j = 0; j < lsize; j++)
      check(mem_word(DST + 32'(4 * j)) == adm[j], $sformatf("L=%0d max[%0d]", lsize, j));
    adm.sort();
    for (int j = 0; j < lsize; j++)
      check(mem_word(DST + 32'(4 * (lsize + j))) == adm[j], $sformatf("L=%0d min[%0d]", lsize, j));
    check(mem_word(DST + 32'(8 * lsize)) == 0, "nothing written past the result");
  endtask

  initial begin
    for (int i = 0; i < int'(N); i++) set_a.push_back(item_t'($urandom() & 32'h7FFF_FFFF));
    for (int i = 0; i < int'(N) / 2; i++) u_mem.mem[(SRC >> 3) + i] = {set_a[2*i+1], set_a[2*i]};
    repeat (3) @(negedge clk);
    rst_n = 1;
    u_ps.write({26'd0, REG_SRC},    SRC);
    u_ps.write({26'd0, REG_DST},    DST);
    u_ps.write({26'd0, REG_NWORDS}, N);
    u_ps.write({26'd0, REG_IRQEN},  32'h1);
    // the subset sizes of the reference experiments: 128 to 1024 bytes
    for (int l = 32; l <= int'(L); l += 32) run_op(l, 1'b0, '0, '0);
    // filtered extraction: only items in the middle half of the range
    run_op(int'(L), 1'b1, 32'h2000_0000, 32'h5FFF_FFFF);
    check(n_bad_bursts == 0, "burst rules");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
