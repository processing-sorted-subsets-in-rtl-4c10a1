// tb_gp_control: writes random settings through the AXI4-Lite port and
// checks them on the cfg outputs and by reading them back (including a
// byte-masked write), checks the one-cycle start pulse, that start is
// ignored while busy, that done sets STATUS and the interrupt only when
// enabled, and that CTRL bit 1 clears it.
module tb_gp_control;
  import ssa_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  axil_req_t   req;
  axil_rsp_t   rsp;
  op_cfg_t     cfg;
  logic        start, busy, done_pulse, error, irq;
  logic [31:0] admitted, cycles;
  int checks = 0, failures = 0;
  int starts = 0;

  gp_control dut (.*);
  axil_bfm u_bfm (.clk, .req, .rsp);

  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] rd;

  initial begin
    busy = 0; done_pulse = 0; error = 0; admitted = 32'd1234; cycles = 32'd777;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 10; round++) begin
      logic [31:0] v [8];
      for (int i = 0; i < 8; i++) v[i] = $urandom();
      u_bfm.write({26'd0, REG_SRC},    v[0]);
      u_bfm.write({26'd0, REG_DST},    v[1]);
      u_bfm.write({26'd0, REG_NWORDS}, v[2]);
      u_bfm.write({26'd0, REG_LMAX},   v[3]);
      u_bfm.write({26'd0, REG_LMIN},   v[4]);
      u_bfm.write({26'd0, REG_LOWER},  v[5]);
      u_bfm.write({26'd0, REG_UPPER},  v[6]);
      u_bfm.write({26'd0, REG_MODE},   v[7]);
      check(cfg.src_addr == v[0] && cfg.dst_addr == v[1] && cfg.n_words == v[2], "addresses/size");
      check(cfg.lmax == v[3][15:0] && cfg.lmin == v[4][15:0], "subset sizes");
      check(cfg.lower == v[5] && cfg.upper == v[6], "bounds");
      check(cfg.use_lower == v[7][0] && cfg.use_upper == v[7][1], "mode");
      u_bfm.read({26'd0, REG_UPPER}, rd);  check(rd == v[6], "read upper");
      u_bfm.read({26'd0, REG_LMAX}, rd);   check(rd == {16'd0, v[3][15:0]}, "read lmax");
      u_bfm.read({26'd0, REG_SRC}, rd);    check(rd == v[0], "read src");
      u_bfm.write({26'd0, REG_LOWER}, 32'hA5A5A5A5, 4'b0100);
      v[5][23:16] = 8'hA5;
      u_bfm.read({26'd0, REG_LOWER}, rd);  check(rd == v[5], "byte-masked write");
    end
    u_bfm.read({26'd0, REG_ADMITTED}, rd); check(rd == 32'd1234, "admitted");
    u_bfm.read({26'd0, REG_CYCLES}, rd);   check(rd == 32'd777, "cycles");
    // start while idle gives one pulse
    starts = 0;
    u_bfm.write({26'd0, REG_CTRL}, 32'h1);
    repeat (3) @(negedge clk);
    check(starts == 1, "one start pulse");
    // start while busy is ignored
    busy = 1;
    u_bfm.write({26'd0, REG_CTRL}, 32'h1);
    repeat (3) @(negedge clk);
    check(starts == 1, "start ignored while busy");
    u_bfm.read({26'd0, REG_STATUS}, rd);   check(rd[0] == 1'b1, "busy in status");
    // done without interrupt enable
    busy = 0; done_pulse = 1; @(negedge clk); done_pulse = 0;
    @(negedge clk);
    check(!irq, "no irq while disabled");
    u_bfm.read({26'd0, REG_STATUS}, rd);   check(rd[1:0] == 2'b10, "done in status");
    u_bfm.write({26'd0, REG_IRQEN}, 32'h1);
    @(negedge clk);
    check(irq, "irq once enabled");
    u_bfm.write({26'd0, REG_CTRL}, 32'h2);
    @(negedge clk);
    check(!irq, "irq cleared");
    u_bfm.read({26'd0, REG_STATUS}, rd);   check(rd[1] == 1'b0, "done cleared");
    error = 1;
    u_bfm.read({26'd0, REG_STATUS}, rd);   check(rd[2] == 1'b1, "error in status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
