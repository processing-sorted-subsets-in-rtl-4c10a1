// sorted_subset_accel: programmable-logic accelerator that extracts the
// largest and the smallest items of a large set held in DDR memory.
//
// The processor programs the GP control unit (AXI4-Lite, gp_req/gp_rsp)
// with the set's address and size, the result address, the subset sizes
// Lmax <= LMAX and Lmin <= LMIN, and optionally bounds l and u, and then
// starts it. The HP control unit reads the set over the 64-bit AXI HP port
// (hp_req/hp_rsp); the block loader unrolls each beat into two items,
// admits those inside the bounds and packs them into blocks of up to K
// items; the subset sorter merges each block into the maximum and the
// minimum subsets while the loader fills the next block. After the final
// block the HP control unit writes Lmax items of the maximum subset
// (largest first) followed by Lmin items of the minimum subset (smallest
// first) as consecutive 32-bit words at the result address, and irq_done
// tells the processor the result is in DDR memory. The PCI control unit
// (pci_req/pci_rsp) is the mailbox through which the host rings the
// processor (irq_doorbell) and polls the completion flag (host_flag).
//
// In copy mode (MODE bit 2) the sorter is bypassed: the FSM has each block
// of admitted items written back, in arrival order, right after the
// previous one, so the result area receives the filtered set itself.
//
// Subset sizes written to the GP registers above LMAX/LMIN are clamped to
// them. If fewer items pass the filter than a subset's size, the subset's
// tail holds fill values (0 in the maximum subset, all ones in the minimum
// subset); ADMITTED tells how many items took part.
//
// Default sizes: blocks of K = 256 items and subsets of up to 256 items,
// the block size and largest subset size of the document's experiments.
// The structure (filter and distributor feeding the subset sorter, HP and
// GP ports, completion interrupt, mailbox) follows the document; the
// register map, result layout and copy-mode sequencing are this design's.
module sorted_subset_accel
  import ssa_pkg::*;
#(
  parameter int unsigned K    = 256,   // items per block
  parameter int unsigned LMAX = 256,   // capacity of the maximum subset
  parameter int unsigned LMIN = 256    // capacity of the minimum subset
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   gp_req,          // AXI GP port from the processor
  output axil_rsp_t   gp_rsp,
  input  axil_req_t   pci_req,         // mailbox, from host and processor
  output axil_rsp_t   pci_rsp,
  output axi_hp_req_t hp_req,          // AXI HP port to DDR memory
  input  axi_hp_rsp_t hp_rsp,
  output logic        irq_done,        // result ready, to the processor
  output logic        irq_doorbell,    // host doorbell, to the processor
  output logic        host_flag        // completion flag seen by the host
);

  localparam int unsigned CW = $clog2(K+1);

  op_cfg_t          cfg;
  logic             start, busy, done, init, rd_start, wr_start, wr_done;
  logic             rd_done, hp_error;
  logic [31:0]      admitted, cycles;

  logic             ld_valid, ld_ready, ld_last;
  beat_t            ld_data;
  logic [LANES-1:0] ld_keep;

  logic             blk_valid, blk_ready, blk_last;
  item_t [K-1:0]    blk_items;
  logic [CW-1:0]    blk_count;
  logic             srt_busy, merged, merged_last;
  logic             srt_valid, srt_ready, copy_accept;
  logic [31:0]      copied, wr_words;
  addr_t            wr_addr;
  logic             wr_off;
  item_t [LMAX-1:0] max_set;
  item_t [LMIN-1:0] min_set;

  logic [31:0]      lmax_eff, lmin_eff;
  logic [31:0]      wr_beat_idx;
  beat_t            wr_beat_data;

  gp_control u_gp (
    .clk, .rst_n,
    .req        (gp_req),
    .rsp        (gp_rsp),
    .cfg        (cfg),
    .start      (start),
    .busy       (busy),
    .done_pulse (done),
    .error      (hp_error),
    .admitted   (admitted),
    .cycles     (cycles),
    .irq        (irq_done)
  );

  pci_control u_pci (
    .clk, .rst_n,
    .req    (pci_req),
    .rsp    (pci_rsp),
    .irq_ps (irq_doorbell),
    .flag   (host_flag)
  );

  accel_fsm u_fsm (
    .clk, .rst_n,
    .start       (start),
    .copy        (cfg.copy),
    .n_words     (cfg.n_words),
    .init        (init),
    .rd_start    (rd_start),
    .merged_last (merged_last),
    .blk_valid   (blk_valid),
    .blk_count   (32'(blk_count)),
    .blk_last    (blk_last),
    .copy_accept (copy_accept),
    .copied      (copied),
    .wr_start    (wr_start),
    .wr_done     (wr_done),
    .busy        (busy),
    .done        (done),
    .cycles      (cycles)
  );

  hp_control u_hp (
    .clk, .rst_n,
    .hp_req       (hp_req),
    .hp_rsp       (hp_rsp),
    .rd_start     (rd_start),
    .src_addr     (cfg.src_addr),
    .n_words      (cfg.n_words),
    .out_valid    (ld_valid),
    .out_ready    (ld_ready),
    .out_data     (ld_data),
    .out_keep     (ld_keep),
    .out_last     (ld_last),
    .rd_done      (rd_done),
    .wr_start     (wr_start),
    .dst_addr     (wr_addr),
    .wr_words     (wr_words),
    .wr_beat_idx  (wr_beat_idx),
    .wr_off       (wr_off),
    .wr_beat_data (wr_beat_data),
    .wr_done      (wr_done),
    .error        (hp_error)
  );

  block_loader #(.K(K)) u_loader (
    .clk, .rst_n,
    .clear     (init),
    .use_lower (cfg.use_lower),
    .use_upper (cfg.use_upper),
    .lower     (cfg.lower),
    .upper     (cfg.upper),
    .in_valid  (ld_valid),
    .in_ready  (ld_ready),
    .in_data   (ld_data),
    .in_keep   (ld_keep),
    .in_last   (ld_last),
    .blk_valid (blk_valid),
    .blk_ready (blk_ready),
    .blk_items (blk_items),
    .blk_count (blk_count),
    .blk_last  (blk_last),
    .admitted  (admitted)
  );

  subset_sorter #(.K(K), .LMAX(LMAX), .LMIN(LMIN)) u_sorter (
    .clk, .rst_n,
    .init        (init),
    .blk_valid   (srt_valid),
    .blk_ready   (srt_ready),
    .blk_items   (blk_items),
    .blk_count   (blk_count),
    .blk_last    (blk_last),
    .busy        (srt_busy),
    .merged      (merged),
    .merged_last (merged_last),
    .max_set     (max_set),
    .min_set     (min_set)
  );

  // Blocks go to the sorter in subset mode and to the FSM in copy mode.
  assign srt_valid = blk_valid && !cfg.copy;
  assign blk_ready = cfg.copy ? copy_accept : srt_ready;

  // Result words. Subset mode: Lmax of the maximum subset, then Lmin of the
  // minimum one, from the result address. Copy mode: the block's items,
  // right after the words already copied.
  always_comb begin
    lmax_eff = (32'(cfg.lmax) > 32'(LMAX)) ? 32'(LMAX) : 32'(cfg.lmax);
    lmin_eff = (32'(cfg.lmin) > 32'(LMIN)) ? 32'(LMIN) : 32'(cfg.lmin);
    wr_words = cfg.copy ? 32'(blk_count) : lmax_eff + lmin_eff;
    wr_addr  = cfg.copy ? cfg.dst_addr + (copied << 2) : cfg.dst_addr;
  end

  function automatic item_t result_word(logic [31:0] j);
    if (cfg.copy)                     return (j < 32'(K)) ? blk_items[j[$clog2(K)-1:0]] : '0;
    else if (j < lmax_eff)            return max_set[j[$clog2(LMAX)-1:0]];
    else if (j < lmax_eff + lmin_eff) return min_set[32'(j - lmax_eff)];
    else                              return '0;
  endfunction

  // lane l of beat b carries word 2b + l - wr_off
  always_comb begin
    for (int l = 0; l < int'(LANES); l++)
      wr_beat_data[l*ITEM_W +: ITEM_W] =
        result_word({wr_beat_idx[30:0], 1'b0} + 32'(l) - 32'(wr_off));
  end

endmodule
