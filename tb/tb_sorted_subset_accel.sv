// tb_sorted_subset_accel: end-to-end runs of the whole accelerator at
// small sizes (blocks of 8, subsets of up to 6 and 5 items).
//
// Each operation follows the full sequence: the host writes a random set
// into the DDR model and rings the doorbell; the processor sees the
// doorbell interrupt, acknowledges it, programs the GP registers (sizes,
// bounds, mode, addresses) and starts; after the completion interrupt it
// reads STATUS and ADMITTED, clears the interrupt and sets the host flag;
// the host sees the flag, clears it and reads the result from memory. The
// result is compared with a reference filter-and-sort done here. The runs
// cover no filter, lower only, upper only and both bounds, sets larger and
// smaller than the subsets, odd item counts, an empty set, subset sizes
// above the capacity, copy mode (the filtered items themselves written
// back, checked word by word), and a memory that stalls at random; each mechanism
// is counted and one that never occurs counts as a failure.
module tb_sorted_subset_accel;
  import ssa_pkg::*;

  localparam int unsigned K = 8, LMAX = 6, LMIN = 5;
  localparam int unsigned DEPTH = 4096;
  localparam logic [31:0] SRC = 32'h0000_0100, DST = 32'h0000_6000;

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

  sorted_subset_accel #(.K(K), .LMAX(LMAX), .LMIN(LMIN)) dut (.*);
  axi_hp_mem_model #(.DEPTH(DEPTH)) u_mem (.clk, .rst_n, .req(hp_req), .rsp(hp_rsp),
    .n_rd_bursts, .n_wr_bursts, .n_stalls, .n_bad_bursts);
  axil_bfm u_ps   (.clk, .req(gp_req),  .rsp(gp_rsp));
  axil_bfm u_host (.clk, .req(pci_req), .rsp(pci_rsp));

  // ------------------------------------------------ mechanism counters
  int m_filter_drop = 0;     // an item was rejected by the bounds
  int m_partial_blk = 0;     // a block was handed off before it was full
  int m_loader_wait = 0;     // a beat waited because the sorter was busy
  int m_overlap     = 0;     // a beat was taken while the sorter merged
  int m_multi_blk   = 0;     // operations with more than one block
  int m_fill        = 0;     // a subset came back with fill values
  int m_clamp       = 0;     // a subset size above the capacity was clamped
  int m_empty       = 0;     // an empty set
  int m_irq         = 0;     // completion interrupts
  int m_doorbell    = 0;     // doorbell interrupts
  int m_copy        = 0;     // copy-mode operations
  int m_odd_write   = 0;     // a copy write started at an odd word

  always @(posedge clk) if (rst_n) begin
    if (dut.u_loader.take && dut.u_loader.lane_admit != dut.u_loader.in_keep) m_filter_drop++;
    if (dut.blk_valid && dut.blk_ready && dut.blk_count < K && !dut.blk_last) m_partial_blk++;
    if (dut.ld_valid && !dut.ld_ready && dut.blk_valid) m_loader_wait++;
    if (dut.ld_valid && dut.ld_ready && dut.u_sorter.busy) m_overlap++;
    if (dut.wr_start && dut.cfg.copy && dut.wr_addr[2]) m_odd_write++;
  end
  always @(posedge irq_done) m_irq++;
  always @(posedge irq_doorbell) m_doorbell++;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic run_op(int n, int lmax, int lmin, bit ul, bit uu, item_t lo, item_t hi,
                        int range, bit cp = 1'b0);
    item_t set_a [$];
    item_t adm [$];
    logic [31:0] rd;
    int nmax, nmin, blocks_before;
    // host: place the set in DDR memory
    for (int i = 0; i < n; i++) begin
      item_t x;
      x = item_t'($urandom_range(0, range));
      set_a.push_back(x);
      if ((!ul || x >= lo) && (!uu || x <= hi)) adm.push_back(x);
    end
    for (int i = 0; i < n; i += 2) begin
      beat_t b;
      b = u_mem.mem[(SRC >> 3) + i / 2];
      b[31:0] = set_a[i];
      if (i + 1 < n) b[63:32] = set_a[i + 1];
      u_mem.mem[(SRC >> 3) + i / 2] = b;
    end
    for (int i = 0; i < 128; i++) u_mem.mem[(DST >> 3) + i] = {2{32'hDEAD_BEEF}};
    // host: doorbell
    u_host.write(32'h0, 32'h1);
    // processor: interrupt, acknowledge, program, start
    while (!irq_doorbell) @(negedge clk);
    u_host.write(32'h8, 32'h1);
    u_ps.write({26'd0, REG_SRC},    SRC);
    u_ps.write({26'd0, REG_DST},    DST);
    u_ps.write({26'd0, REG_NWORDS}, 32'(n));
    u_ps.write({26'd0, REG_LMAX},   32'(lmax));
    u_ps.write({26'd0, REG_LMIN},   32'(lmin));
    u_ps.write({26'd0, REG_LOWER},  lo);
    u_ps.write({26'd0, REG_UPPER},  hi);
    u_ps.write({26'd0, REG_MODE},   {29'd0, cp, uu, ul});
    u_ps.write({26'd0, REG_IRQEN},  32'h1);
    blocks_before = blocks_seen;
    u_ps.write({26'd0, REG_CTRL},   32'h1);
    while (!irq_done) @(negedge clk);
    u_ps.read({26'd0, REG_STATUS}, rd);
    check(rd[2:0] == 3'b010, $sformatf("status %b", rd[2:0]));
    u_ps.read({26'd0, REG_ADMITTED}, rd);
    check(rd == 32'(adm.size()), $sformatf("admitted %0d expected %0d", rd, adm.size()));
    u_ps.write({26'd0, REG_CTRL}, 32'h2);
    check(!irq_done, "interrupt cleared");
    u_host.write(32'h4, 32'h1);       // processor sets the host flag
    // host: poll the flag, clear it, read the result
    do u_host.read(32'h4, rd); while (rd[0] == 1'b0);
    u_host.write(32'h4, 32'h0);
    if (cp) begin
      // copy mode: the admitted items, in order, then untouched memory
      m_copy++;
      foreach (adm[j])
        check(mem_word(DST + 32'(4 * j)) == adm[j], $sformatf("copy word %0d", j));
      check(mem_word(DST + 32'(4 * adm.size())) == 32'hDEAD_BEEF, "nothing written past the copy");
      return;
    end
    nmax = (lmax > int'(LMAX)) ? int'(LMAX) : lmax;
    nmin = (lmin > int'(LMIN)) ? int'(LMIN) : lmin;
    if (lmax > int'(LMAX) || lmin > int'(LMIN)) m_clamp++;
    if (adm.size() < nmax || adm.size() < nmin) m_fill++;
    if (n == 0) m_empty++;
    if (blocks_seen - blocks_before > 1) m_multi_blk++;
    adm.rsort();
    for (int j = 0; j < nmax; j++)
      check(mem_word(DST + 32'(4 * j)) == ((j < adm.size()) ? adm[j] : item_t'(0)),
            $sformatf("n=%0d max[%0d]=%0d", n, j, mem_word(DST + 32'(4 * j))));
    adm.sort();
    for (int j = 0; j < nmin; j++)
      check(mem_word(DST + 32'(4 * (nmax + j))) == ((j < adm.size()) ? adm[j] : '1),
            $sformatf("n=%0d min[%0d]=%0d", n, j, mem_word(DST + 32'(4 * (nmax + j)))));
    // the word after the result must be untouched
    check(mem_word(DST + 32'(4 * (nmax + nmin))) == 32'hDEAD_BEEF, "nothing written past the result");
  endtask

  int blocks_seen = 0;
  always @(posedge clk) if (dut.blk_valid && dut.blk_ready) blocks_seen++;

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) u_mem.mem[i] = {2{32'hDEAD_BEEF}};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_op(40, 6, 5, 0, 0, 0, 0, 1000);            // plain extraction
    run_op(77, 4, 3, 0, 0, 0, 0, 50);              // odd size, repeated values
    run_op(60, 6, 5, 1, 0, 400, 0, 1000);          // lower bound only
    run_op(60, 6, 5, 0, 1, 0, 300, 1000);          // upper bound only
    run_op(90, 5, 5, 1, 1, 200, 700, 1000);        // both bounds
    run_op(3, 6, 5, 0, 0, 0, 0, 1000);             // fewer items than L
    run_op(0, 6, 5, 0, 0, 0, 0, 1000);             // empty set
    run_op(50, 9, 20, 0, 0, 0, 0, 1000);           // sizes above capacity
    run_op(64, 6, 5, 1, 1, 450, 460, 1000);        // narrow filter
    run_op(200, 6, 5, 0, 0, 0, 0, 32'hFFFF_FFFF);  // full 32-bit range
    run_op(90, 6, 5, 1, 1, 200, 700, 1000, 1'b1);  // copy the filtered items
    run_op(31, 6, 5, 0, 0, 0, 0, 1000, 1'b1);      // copy everything, odd size
    run_op(0, 6, 5, 0, 0, 0, 0, 1000, 1'b1);       // copy an empty set
    run_op(400, 6, 5, 1, 0, 500, 0, 1000, 1'b1);   // copy, many short blocks
    check(m_filter_drop > 0, "filter rejected items");
    check(m_partial_blk > 0, "partial block handoff");
    check(m_loader_wait > 0, "loader waited for the sorter");
    check(m_overlap > 0,     "loading overlapped merging");
    check(m_multi_blk > 0,   "multi-block operation");
    check(m_fill > 0,        "fill values returned");
    check(m_clamp > 0,       "subset size clamped");
    check(m_empty > 0,       "empty set");
    check(m_irq == 14,       $sformatf("completion interrupts %0d", m_irq));
    check(m_doorbell == 14,  "doorbell interrupts");
    check(m_copy == 4,       "copy-mode operations");
    check(m_odd_write > 0,   "copy write at an odd word");
    check(n_stalls > 0,      "memory stalls");
    check(n_bad_bursts == 0, "burst rules");
    $display("copies=%0d odd-word writes=%0d", m_copy, m_odd_write);
    $display("mechanisms: drop=%0d partial=%0d wait=%0d overlap=%0d multi=%0d fill=%0d clamp=%0d empty=%0d irq=%0d bursts=%0d/%0d",
             m_filter_drop, m_partial_blk, m_loader_wait, m_overlap, m_multi_blk, m_fill, m_clamp,
             m_empty, m_irq, n_rd_bursts, n_wr_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
