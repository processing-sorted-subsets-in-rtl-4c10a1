// block_loader: distributor, address counter and input registers of the
// filtering circuit.
//
// Each 64-bit beat from the AXI HP read channel holds LANES (two) 32-bit
// items. The distributor unrolls the beat into its lanes, a bound_filter per
// lane decides which items are admitted, and every admitted item is written
// (write enable asserted) to the input register selected by the address
// counter, which then advances by the number of admitted items. Items that
// are not admitted leave the counter alone, so the registers fill densely.
//
// When the input registers hold K items, when the next beat would not fit,
// or after the beat flagged last, the block is offered to the sorter
// (blk_valid, blk_count items in blk_items[0..blk_count-1], blk_last for
// the final block of the set). The sorter copies the registers in the cycle
// it accepts the block (blk_ready), so filling of the next block starts in
// the following cycle while the sorter works on the previous one.
//
// Timing: one beat per cycle while in_ready is high; in_ready is low while
// a block waits to be accepted. A beat that would overflow the registers is
// held (not accepted) and the partly filled block is handed off first, so a
// block may hold fewer than K items when filtering is on; the sorter pads
// the rest. admitted counts every item that passed since clear.
//
// The distributor, filter, address counter and write enable follow the
// document's filtering circuit; the handoff rules, the partial-block
// handling and the lane mask for an odd item count are this design's own.
module block_loader
  import ssa_pkg::*;
#(
  parameter int unsigned K = 256          // items per block
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,      // start of a new set
  // filter settings
  input  logic                     use_lower,
  input  logic                     use_upper,
  input  item_t                    lower,
  input  item_t                    upper,
  // beats from the HP read channel
  input  logic                     in_valid,
  output logic                     in_ready,
  input  beat_t                    in_data,
  input  logic [LANES-1:0]         in_keep,    // lane holds an item of the set
  input  logic                     in_last,    // final beat of the set
  // blocks to the sorter
  output logic                     blk_valid,
  input  logic                     blk_ready,
  output item_t [K-1:0]            blk_items,
  output logic [$clog2(K+1)-1:0]   blk_count,
  output logic                     blk_last,
  output logic [31:0]              admitted
);

  localparam int unsigned CW = $clog2(K+1);
  typedef logic [CW-1:0] cnt_t;

  item_t [K-1:0]    regs;          // input registers
  cnt_t             addr_q;        // address counter
  logic             pending_q;     // block waiting for the sorter
  logic             last_q;

  item_t            lane_item [LANES];
  logic [LANES-1:0] lane_admit;
  cnt_t             lane_addr [LANES];
  cnt_t             n_admit;
  logic             fits;
  logic             take;

  // Distributor and one filter per lane.
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    assign lane_item[l] = in_data[l*ITEM_W +: ITEM_W];
    bound_filter u_filter (
      .valid     (in_keep[l]),
      .item      (lane_item[l]),
      .use_lower (use_lower),
      .use_upper (use_upper),
      .lower     (lower),
      .upper     (upper),
      .admit     (lane_admit[l])
    );
  end

  // Write addresses: the counter plus the admitted lanes below this one.
  always_comb begin
    cnt_t acc;
    acc = addr_q;
    for (int l = 0; l < LANES; l++) begin
      lane_addr[l] = acc;
      acc = acc + cnt_t'(lane_admit[l]);
    end
    n_admit = acc - addr_q;
  end

  assign fits     = (int'(addr_q) + int'(n_admit)) <= int'(K);
  assign in_ready = !pending_q && fits;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q    <= '0;
      pending_q <= 1'b0;
      last_q    <= 1'b0;
      admitted  <= '0;
    end else if (clear) begin
      addr_q    <= '0;
      pending_q <= 1'b0;
      last_q    <= 1'b0;
      admitted  <= '0;
    end else if (pending_q) begin
      if (blk_ready) begin
        pending_q <= 1'b0;
        last_q    <= 1'b0;
        addr_q    <= '0;
      end
    end else if (in_valid && !fits) begin
      // next beat would overflow: hand off what is there first
      pending_q <= 1'b1;
    end else if (take) begin
      addr_q   <= addr_q + n_admit;
      admitted <= admitted + 32'(n_admit);
      if (in_last || (int'(addr_q) + int'(n_admit) == int'(K))) begin
        pending_q <= 1'b1;
        last_q    <= in_last;
      end
    end
  end

  // Input registers with per-lane write enable.
  always_ff @(posedge clk) begin
    if (take && !clear) begin
      for (int l = 0; l < LANES; l++) begin
        if (lane_admit[l]) regs[lane_addr[l][$clog2(K)-1:0]] <= lane_item[l];
      end
    end
  end

  assign blk_valid = pending_q;
  assign blk_items = regs;
  assign blk_count = addr_q;
  assign blk_last  = last_q;

  // A block offered to the sorter stays unchanged until it is taken.
  property p_blk_stable;
    @(posedge clk) disable iff (!rst_n || clear)
      blk_valid && !blk_ready |=> blk_valid && $stable(blk_count) && $stable(blk_last);
  endproperty
  a_blk_stable: assert property (p_blk_stable);

endmodule
