// transposition_net: iterative even-odd transposition sorting network.
//
// A chain of N registers with a comparator between every pair of neighbours.
// Each clock in which run is high applies two comparator levels: first the
// even pairs (0,1), (2,3), ... and then the odd pairs (1,2), (3,4), ...;
// every comparator swaps its pair when the two items are out of order. With
// DESC = 1 the chain is ordered largest-first (index 0 holds the largest
// item); with DESC = 0 smallest-first. Only two comparator levels lie between
// register stages, which keeps the combinational depth small; the same
// levels are reused clock after clock until the chain is ordered.
//
// moved tells, combinationally, whether the next run step would change the
// chain. When it is low the chain is fully ordered: both levels found all
// their pairs in order. An unordered chain of N items needs at most about
// N/2 clocks.
//
// load writes load_data[i] into every register whose load_mask[i] is set
// (load has priority over run). The iterative network of the document's
// reference design is used for the function; the two-levels-per-clock
// arrangement and the moved flag are this design's reading of it.
module transposition_net
  import ssa_pkg::*;
#(
  parameter int unsigned N    = 512,   // number of registers in the chain
  parameter bit          DESC = 1'b1   // 1: largest first, 0: smallest first
) (
  input  logic            clk,
  input  logic            load,
  input  logic  [N-1:0] load_mask,
  input  item_t [N-1:0] load_data,
  input  logic            run,
  output item_t [N-1:0] data,
  output logic            moved
);

  item_t [N-1:0] chain_q;
  item_t [N-1:0] after_even;
  item_t [N-1:0] after_odd;
  logic  [N-1:0] swap_even;   // swap_even[i]: comparator on pair (i, i+1)
  logic  [N-1:0] swap_odd;

  // true when a (at the lower index) and b are out of order
  function automatic logic out_of_order(item_t a, item_t b);
    return DESC ? (a < b) : (a > b);
  endfunction

  // Level 1: comparators on the even pairs (0,1), (2,3), ...
  for (genvar i = 0; i < int'(N); i++) begin : g_even
    if (i % 2 == 0 && i + 1 < int'(N)) begin : g_cmp
      assign swap_even[i]    = out_of_order(chain_q[i], chain_q[i+1]);
      assign after_even[i]   = swap_even[i] ? chain_q[i+1] : chain_q[i];
      assign after_even[i+1] = swap_even[i] ? chain_q[i] : chain_q[i+1];
    end else if (i % 2 == 0) begin : g_tail   // last register of an odd-length chain
      assign swap_even[i]  = 1'b0;
      assign after_even[i] = chain_q[i];
    end else begin : g_none
      assign swap_even[i] = 1'b0;
    end
  end

  // Level 2: comparators on the odd pairs (1,2), (3,4), ...
  for (genvar i = 0; i < int'(N); i++) begin : g_odd
    if (i % 2 == 1 && i + 1 < int'(N)) begin : g_cmp
      assign swap_odd[i]    = out_of_order(after_even[i], after_even[i+1]);
      assign after_odd[i]   = swap_odd[i] ? after_even[i+1] : after_even[i];
      assign after_odd[i+1] = swap_odd[i] ? after_even[i] : after_even[i+1];
    end else if (i == 0 || i % 2 == 1) begin : g_end   // ends of the chain
      assign swap_odd[i]  = 1'b0;
      assign after_odd[i] = after_even[i];
    end else begin : g_none
      assign swap_odd[i] = 1'b0;
    end
  end

  assign moved = (|swap_even) || (|swap_odd);

  // value of each register after a load: new data where the mask is set
  item_t [N-1:0] loaded;
  for (genvar i = 0; i < int'(N); i++) begin : g_load
    assign loaded[i] = load_mask[i] ? load_data[i] : chain_q[i];
  end

  always_ff @(posedge clk) begin
    if (load)     chain_q <= loaded;
    else if (run) chain_q <= after_odd;
  end

  assign data = chain_q;

endmodule
