// axil_bfm: AXI4-Lite master for testbenches. write() and read() run one
// transaction each; with JITTER set, the address, data and response
// handshakes are spread over random cycles (address before data, data
// before address, or both together), exercising every ordering a slave
// must accept. Drives on the falling edge, samples on the rising edge.
module axil_bfm
  import ssa_pkg::*;
#(
  parameter bit JITTER = 1'b1
) (
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       input logic [3:0] strb = 4'hF);
    bit aw_done = 0, w_done = 0;
    int aw_delay, w_delay;
    aw_delay = JITTER ? $urandom_range(0, 2) : 0;
    w_delay  = JITTER ? $urandom_range(0, 2) : 0;
    @(negedge clk);
    req.awaddr = addr;
    req.wdata  = data;
    req.wstrb  = strb;
    while (!(aw_done && w_done)) begin
      req.awvalid = !aw_done && (aw_delay == 0);
      req.wvalid  = !w_done && (w_delay == 0);
      if (aw_delay > 0) aw_delay--;
      if (w_delay > 0) w_delay--;
      @(posedge clk);
      if (req.awvalid && rsp.awready) aw_done = 1;
      if (req.wvalid && rsp.wready) w_done = 1;
      @(negedge clk);
    end
    req.awvalid = 0;
    req.wvalid  = 0;
    if (JITTER) repeat ($urandom_range(0, 2)) @(negedge clk);
    req.bready = 1;
    @(posedge clk);
    while (!rsp.bvalid) @(posedge clk);
    @(negedge clk);
    req.bready = 0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    req.araddr  = addr;
    req.arvalid = 1;
    @(posedge clk);
    while (!rsp.arready) @(posedge clk);
    @(negedge clk);
    req.arvalid = 0;
    if (JITTER) repeat ($urandom_range(0, 2)) @(negedge clk);
    req.rready = 1;
    @(posedge clk);
    while (!rsp.rvalid) @(posedge clk);
    data = rsp.rdata;
    @(negedge clk);
    req.rready = 0;
  endtask

endmodule
