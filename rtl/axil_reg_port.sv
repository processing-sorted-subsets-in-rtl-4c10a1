// axil_reg_port: AXI4-Lite slave front end for a bank of 32-bit registers.
//
// Turns the five AXI4-Lite channels into single-cycle register strobes. A
// write is accepted when both its address (AW) and its data (W) have arrived,
// in either order; wr_en then pulses for one cycle with wr_addr, wr_data and
// wr_strb, and the write response (always OKAY) is raised in the next cycle
// and held until bready. A read address (AR) gives a one-cycle rd_en pulse;
// the bank returns rd_data combinationally in that cycle and the data are
// held on R until rready. One transaction of each kind is outstanding at a
// time. The register bank behind it decides what the addresses mean.
//
// Used by the GP control unit and the PCI control unit; the handshake is
// the AXI4-Lite protocol, the single-outstanding arrangement is this
// design's choice.
module axil_reg_port
  import ssa_pkg::*;
#(
  parameter int unsigned AW = 6            // register address bits used
) (
  input  logic          clk,
  input  logic          rst_n,
  input  axil_req_t     req,
  output axil_rsp_t     rsp,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [31:0]   wr_data,
  output logic [3:0]    wr_strb,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [31:0]   rd_data
);

  logic          aw_have, w_have, b_pend, r_pend;
  logic [AW-1:0] aw_q;
  logic [31:0]   w_q, r_q;
  logic [3:0]    s_q;

  assign rsp.awready = !aw_have && !b_pend;
  assign rsp.wready  = !w_have  && !b_pend;
  assign rsp.bvalid  = b_pend;
  assign rsp.bresp   = AXI_RESP_OKAY;
  assign rsp.arready = !r_pend;
  assign rsp.rvalid  = r_pend;
  assign rsp.rdata   = r_q;
  assign rsp.rresp   = AXI_RESP_OKAY;

  logic aw_fire, w_fire;
  assign aw_fire = req.awvalid && rsp.awready;
  assign w_fire  = req.wvalid  && rsp.wready;

  // the write happens once both halves are present (this cycle or held)
  assign wr_en   = (aw_have || aw_fire) && (w_have || w_fire);
  assign wr_addr = aw_have ? aw_q : req.awaddr[AW-1:0];
  assign wr_data = w_have  ? w_q  : req.wdata;
  assign wr_strb = w_have  ? s_q  : req.wstrb;

  assign rd_en   = req.arvalid && rsp.arready;
  assign rd_addr = req.araddr[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_have <= 1'b0;
      w_have  <= 1'b0;
      b_pend  <= 1'b0;
      r_pend  <= 1'b0;
      aw_q    <= '0;
      w_q     <= '0;
      s_q     <= '0;
      r_q     <= '0;
    end else begin
      if (wr_en) begin
        aw_have <= 1'b0;
        w_have  <= 1'b0;
        b_pend  <= 1'b1;
      end else begin
        if (aw_fire) begin
          aw_have <= 1'b1;
          aw_q    <= req.awaddr[AW-1:0];
        end
        if (w_fire) begin
          w_have <= 1'b1;
          w_q    <= req.wdata;
          s_q    <= req.wstrb;
        end
      end
      if (b_pend && req.bready) b_pend <= 1'b0;
      if (rd_en) begin
        r_pend <= 1'b1;
        r_q    <= rd_data;
      end else if (r_pend && req.rready) begin
        r_pend <= 1'b0;
      end
    end
  end

  // AXI rule: a response, once valid, stays valid until accepted.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             rsp.bvalid && !req.bready |=> rsp.bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             rsp.rvalid && !req.rready |=> rsp.rvalid && $stable(rsp.rdata));

endmodule
