// subset_sorter: builds the maximum and the minimum subsets of a stream of
// blocks.
//
// Two transposition networks share every incoming block. The upper network
// holds the maximum subset (LMAX registers, largest first) followed by K
// block registers; the lower network holds the minimum subset (LMIN
// registers, smallest first) followed by its own copy of the block. At init
// the maximum subset is filled with the smallest possible value (0) and the
// minimum subset with the largest (all ones). For each block the K items are
// copied into both networks (block positions beyond blk_count receive the
// same fill values, so they can never displace a real item) and both
// networks iterate until neither moves an item: large items have then risen
// into the maximum subset and small items have sunk into the minimum subset.
// Items left in the block registers are discarded by the next block. After
// the last block max_set[0..LMAX-1] is the LMAX largest items of the set in
// descending order and min_set[0..LMIN-1] the LMIN smallest in ascending
// order; while fewer items than a subset's size have been seen, its tail
// still holds fill values.
//
// Handshake: blk_ready is high when the sorter is idle; a block is copied in
// the cycle blk_valid && blk_ready. Merging then takes at most about
// (LMAX+K)/2 + 1 clocks. merged pulses for one cycle when a
// block's merge ends, with merged_last set for the block flagged last.
//
// The structure (subsets at both ends, block in the middle, fill values at
// init, one block at a time) follows the document; giving each subset its
// own copy of the block is this design's way of letting an item rise and
// sink at once.
module subset_sorter
  import ssa_pkg::*;
#(
  parameter int unsigned K    = 256,   // items per block
  parameter int unsigned LMAX = 256,   // registers of the maximum subset
  parameter int unsigned LMIN = 256    // registers of the minimum subset
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    init,        // fill both subsets
  input  logic                    blk_valid,
  output logic                    blk_ready,
  input  item_t [K-1:0]           blk_items,
  input  logic [$clog2(K+1)-1:0]  blk_count,
  input  logic                    blk_last,
  output logic                    busy,
  output logic                    merged,      // a block's merge has ended
  output logic                    merged_last, // ... and it was the last one
  output item_t [LMAX-1:0]        max_set,
  output item_t [LMIN-1:0]        min_set
);

  localparam int unsigned NMAX = LMAX + K;
  localparam int unsigned NMIN = LMIN + K;
  localparam item_t FILL_LOW  = '0;
  localparam item_t FILL_HIGH = '1;

  typedef enum logic {S_IDLE, S_SORT} state_t;
  state_t state_q;
  logic   last_q;

  logic  hi_load, lo_load, run;
  logic  [NMAX-1:0] hi_mask;
  logic  [NMIN-1:0] lo_mask;
  item_t [NMAX-1:0] hi_data;
  item_t [NMIN-1:0] lo_data;
  item_t [NMAX-1:0] hi_chain;
  item_t [NMIN-1:0] lo_chain;
  logic  hi_moved, lo_moved;
  logic  take;

  assign take      = blk_valid && blk_ready;
  assign blk_ready = (state_q == S_IDLE) && !init;
  assign busy      = (state_q != S_IDLE);

  // Load values: at init the whole chain gets its fill value, for a block
  // only the block registers are written; block positions past blk_count
  // get the fill value too.
  for (genvar i = 0; i < int'(LMAX); i++) begin : g_hi_sub
    assign hi_mask[i] = init;
    assign hi_data[i] = FILL_LOW;
  end
  for (genvar i = 0; i < int'(LMIN); i++) begin : g_lo_sub
    assign lo_mask[i] = init;
    assign lo_data[i] = FILL_HIGH;
  end
  for (genvar j = 0; j < int'(K); j++) begin : g_blk
    logic present;
    assign present             = !init && (j < int'(blk_count));
    assign hi_mask[LMAX + j]   = 1'b1;
    assign hi_data[LMAX + j]   = present ? blk_items[j] : FILL_LOW;
    assign lo_mask[LMIN + j]   = 1'b1;
    assign lo_data[LMIN + j]   = present ? blk_items[j] : FILL_HIGH;
  end

  assign hi_load = init || take;
  assign lo_load = init || take;
  assign run     = (state_q == S_SORT);

  transposition_net #(.N(NMAX), .DESC(1'b1)) u_max_net (
    .clk       (clk),
    .load      (hi_load),
    .load_mask (hi_mask),
    .load_data (hi_data),
    .run       (run),
    .data      (hi_chain),
    .moved     (hi_moved)
  );

  transposition_net #(.N(NMIN), .DESC(1'b0)) u_min_net (
    .clk       (clk),
    .load      (lo_load),
    .load_mask (lo_mask),
    .load_data (lo_data),
    .run       (run),
    .data      (lo_chain),
    .moved     (lo_moved)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      last_q      <= 1'b0;
      merged      <= 1'b0;
      merged_last <= 1'b0;
    end else begin
      merged      <= 1'b0;
      merged_last <= 1'b0;
      unique case (state_q)
        S_IDLE: if (take) begin
          state_q <= S_SORT;         // block enters the chains now
          last_q  <= blk_last;
        end
        S_SORT: if (!hi_moved && !lo_moved) begin
          state_q     <= S_IDLE;
          merged      <= 1'b1;
          merged_last <= last_q;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign max_set = hi_chain[LMAX-1:0];
  assign min_set = lo_chain[LMIN-1:0];

endmodule
