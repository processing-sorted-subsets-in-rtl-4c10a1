// bound_filter: the "l and/or u" admission test applied to one data item.
//
// An item is admitted when it is valid and lies inside the bounds that are
// switched on: item >= lower when use_lower is set, item <= upper when
// use_upper is set. With both switched off every valid item is admitted, so
// the same datapath serves plain subset extraction and filtered extraction.
// Items are unsigned 32-bit integers; both bounds are inclusive.
//
// Purely combinational: admit follows the inputs in the same cycle. The
// test itself follows the document; unsigned comparison and inclusive bounds
// are this design's choices.
module bound_filter
  import ssa_pkg::*;
(
  input  logic  valid,      // the item is present
  input  item_t item,
  input  logic  use_lower,  // compare against lower bound l
  input  logic  use_upper,  // compare against upper bound u
  input  item_t lower,
  input  item_t upper,
  output logic  admit       // item passes the filter
);

  logic ok_lower, ok_upper;

  always_comb begin
    ok_lower = !use_lower || (item >= lower);
    ok_upper = !use_upper || (item <= upper);
    admit    = valid && ok_lower && ok_upper;
  end

endmodule
