// tb_bound_filter: checks the l/u admission test against a reference
// computed in the testbench, for every combination of the two enables, on
// random items and on items equal to and one either side of each bound.
module tb_bound_filter;
  import ssa_pkg::*;

  logic  valid, use_lower, use_upper, admit;
  item_t item, lower, upper;
  int    checks = 0, failures = 0;

  bound_filter dut (.*);

  task automatic check_one(item_t x);
    logic exp;
    item = x;
    #1;
    exp = valid;
    if (use_lower && x < lower) exp = 1'b0;
    if (use_upper && x > upper) exp = 1'b0;
    checks++;
    if (admit !== exp) begin
      failures++;
      $display("FAIL item=%0d l=%0d u=%0d ul=%0b uu=%0b v=%0b admit=%0b", x, lower, upper,
               use_lower, use_upper, valid, admit);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 200; round++) begin
      lower = $urandom();
      upper = $urandom();
      if (round % 5 == 0) begin lower = 32'd100; upper = 32'd200; end
      for (int m = 0; m < 8; m++) begin
        {valid, use_lower, use_upper} = {m[2] | (round % 7 != 0), m[1], m[0]};
        check_one($urandom());
        check_one(lower);
        check_one(lower - 1);
        check_one(lower + 1);
        check_one(upper);
        check_one(upper - 1);
        check_one(upper + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
