// tb_pci_control: plays the host and the processor on the mailbox: the
// host rings the doorbell and the interrupt must rise; the processor
// acknowledges and it must fall; the processor sets the flag, the host
// reads and clears it; MESSAGE keeps byte-masked writes. Values are
// checked both on the output pins and through register reads.
module tb_pci_control;
  import ssa_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  axil_req_t req;
  axil_rsp_t rsp;
  logic      irq_ps, flag;
  int checks = 0, failures = 0;

  pci_control dut (.*);
  axil_bfm u_bfm (.clk, .req, .rsp);

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

  logic [31:0] rd, msg;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!irq_ps && !flag, "idle after reset");
    msg = 0;
    for (int round = 0; round < 20; round++) begin
      logic [31:0] m;
      logic [3:0]  s;
      u_bfm.write(32'h0, 32'h1);                      // host: doorbell
      @(negedge clk);
      check(irq_ps, "doorbell raises irq");
      u_bfm.read(32'h0, rd);
      check(rd == 32'h1, "doorbell pending reads 1");
      u_bfm.write(32'h0, 32'h0);                      // writing 0 does nothing
      check(irq_ps, "irq stays until acknowledged");
      u_bfm.write(32'h8, 32'h1);                      // processor: acknowledge
      @(negedge clk);
      check(!irq_ps, "ack clears irq");
      u_bfm.read(32'h4, rd);
      check(rd == 32'h0 && !flag, "flag clear before completion");
      u_bfm.write(32'h4, 32'h1);                      // processor: result ready
      @(negedge clk);
      check(flag, "flag set");
      u_bfm.read(32'h4, rd);
      check(rd == 32'h1, "host sees flag");
      u_bfm.write(32'h4, 32'h0);                      // host: clear flag
      @(negedge clk);
      check(!flag, "flag cleared");
      m = $urandom();
      s = 4'($urandom());
      u_bfm.write(32'hC, m, s);
      for (int b = 0; b < 4; b++) if (s[b]) msg[b*8 +: 8] = m[b*8 +: 8];
      u_bfm.read(32'hC, rd);
      check(rd == msg, $sformatf("message %h expected %h", rd, msg));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
