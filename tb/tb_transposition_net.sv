// tb_transposition_net: loads random chains (and partial, masked loads)
// into a descending network of odd length and an ascending one of even
// length, runs each until it reports no movement, and compares the result
// with a reference sort done in the testbench. Also checks that moved is
// low only for an ordered chain and that ordering takes at most N/2 + 1
// clocks.
module tb_transposition_net;
  import ssa_pkg::*;

  localparam int unsigned N1 = 9;
  localparam int unsigned N2 = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             load1, run1, moved1, load2, run2, moved2;
  logic  [N1-1:0]   mask1;
  logic  [N2-1:0]   mask2;
  item_t [N1-1:0]   din1, dout1;
  item_t [N2-1:0]   din2, dout2;
  int checks = 0, failures = 0;

  transposition_net #(.N(N1), .DESC(1'b1)) dut1 (.clk, .load(load1), .load_mask(mask1),
    .load_data(din1), .run(run1), .data(dout1), .moved(moved1));
  transposition_net #(.N(N2), .DESC(1'b0)) dut2 (.clk, .load(load2), .load_mask(mask2),
    .load_data(din2), .run(run2), .data(dout2), .moved(moved2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  item_t ref1 [$];
  item_t ref2 [$];

  initial begin
    load1 = 0; run1 = 0; load2 = 0; run2 = 0; mask1 = '0; mask2 = '0;
    din1 = '0; din2 = '0;
    for (int t = 0; t < 60; t++) begin
      int cyc;
      // first trial loads all registers, later ones a random subset
      @(negedge clk);
      mask1 = (t == 0) ? '1 : N1'($urandom());
      mask2 = (t == 0) ? '1 : N2'($urandom());
      for (int i = 0; i < int'(N1); i++) din1[i] = (t % 3 == 0) ? item_t'($urandom_range(0, 5)) : $urandom();
      for (int i = 0; i < int'(N2); i++) din2[i] = (t % 3 == 0) ? item_t'($urandom_range(0, 5)) : $urandom();
      ref1.delete(); ref2.delete();
      for (int i = 0; i < int'(N1); i++) ref1.push_back(mask1[i] ? din1[i] : dout1[i]);
      for (int i = 0; i < int'(N2); i++) ref2.push_back(mask2[i] ? din2[i] : dout2[i]);
      ref1.rsort(); ref2.sort();
      load1 = 1; load2 = 1;
      @(negedge clk);
      load1 = 0; load2 = 0;
      // loaded values must be exactly what was asked for
      for (int i = 0; i < int'(N1); i++) if (mask1[i]) check(dout1[i] == din1[i], "load1");
      run1 = 1; run2 = 1;
      cyc = 0;
      while ((moved1 || moved2) && cyc < 100) begin
        @(negedge clk);
        cyc++;
      end
      run1 = 0; run2 = 0;
      check(cyc <= int'(N2) / 2 + 1, $sformatf("took %0d clocks", cyc));
      for (int i = 0; i < int'(N1); i++) check(dout1[i] == ref1[i], $sformatf("desc[%0d]", i));
      for (int i = 0; i < int'(N2); i++) check(dout2[i] == ref2[i], $sformatf("asc[%0d]", i));
      check(!moved1 && !moved2, "moved low when ordered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
