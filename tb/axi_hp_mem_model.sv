// axi_hp_mem_model: behavioural model of DDR memory behind an AXI3 HP port,
// for simulation only.
//
// Holds DEPTH 64-bit words addressed by byte address / 8 (wrapping). Read
// bursts are queued (several may be outstanding) and returned in order, one
// beat per cycle when the model is not stalling; write bursts take an
// address, then their beats (byte strobes honoured), then give one OKAY
// response. With STALL set the ready and valid outputs drop at random, so
// the master sees back-pressure on every channel. Counters report the
// number of bursts and stall cycles seen.
module axi_hp_mem_model
  import ssa_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter bit          STALL = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axi_hp_req_t req,
  output axi_hp_rsp_t rsp,
  output int          n_rd_bursts,
  output int          n_wr_bursts,
  output int          n_stalls,
  output int          n_bad_bursts   // bursts over 16 beats or across 4 KB
);

  beat_t mem [DEPTH];

  // read side
  addr_t       rq_addr [$];
  int unsigned rq_len  [$];
  addr_t       r_addr;
  int unsigned r_left;
  logic        r_active;
  logic        stall_ar, stall_r, stall_aw, stall_w;

  // write side
  addr_t       w_addr;
  int unsigned w_left;
  logic        w_active;
  int unsigned b_pending;

  function automatic int unsigned idx(addr_t a);
    return (a >> 3) % DEPTH;
  endfunction

  function automatic bit crosses_4k(addr_t a, logic [3:0] len);
    return ((a & 32'hFFF) + ((32'(len) + 1) << 3)) > 32'h1000;
  endfunction

  always_ff @(posedge clk) begin
    stall_ar <= STALL && ($urandom_range(0, 3) == 0);
    stall_r  <= STALL && ($urandom_range(0, 4) == 0);
    stall_aw <= STALL && ($urandom_range(0, 3) == 0);
    stall_w  <= STALL && ($urandom_range(0, 4) == 0);
  end

  always_comb begin
    rsp = '0;
    rsp.arready = !stall_ar;
    rsp.rvalid  = r_active && !stall_r;
    rsp.rdata   = r_active ? mem[idx(r_addr)] : '0;
    rsp.rlast   = r_active && (r_left == 1);
    rsp.rresp   = AXI_RESP_OKAY;
    rsp.awready = !w_active && !stall_aw;
    rsp.wready  = w_active && !stall_w;
    rsp.bvalid  = (b_pending != 0);
    rsp.bresp   = AXI_RESP_OKAY;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_active    <= 1'b0;
      w_active    <= 1'b0;
      b_pending   <= 0;
      n_rd_bursts <= 0;
      n_wr_bursts <= 0;
      n_stalls    <= 0;
      n_bad_bursts <= 0;
      rq_addr.delete();
      rq_len.delete();
    end else begin
      if (stall_ar || stall_r || stall_aw || stall_w) n_stalls <= n_stalls + 1;
      if (req.arvalid && rsp.arready) begin
        rq_addr.push_back(req.araddr);
        rq_len.push_back(int'(req.arlen) + 1);
        n_rd_bursts <= n_rd_bursts + 1;
        if (crosses_4k(req.araddr, req.arlen)) n_bad_bursts <= n_bad_bursts + 1;
      end
      if (!r_active && rq_addr.size() != 0) begin
        r_addr   <= rq_addr.pop_front();
        r_left   <= rq_len.pop_front();
        r_active <= 1'b1;
      end else if (rsp.rvalid && req.rready) begin
        r_addr <= r_addr + 8;
        r_left <= r_left - 1;
        if (r_left == 1) r_active <= 1'b0;
      end
      if (req.awvalid && rsp.awready) begin
        w_addr   <= req.awaddr;
        w_left   <= int'(req.awlen) + 1;
        w_active <= 1'b1;
        n_wr_bursts <= n_wr_bursts + 1;
        if (crosses_4k(req.awaddr, req.awlen)) n_bad_bursts <= n_bad_bursts + 1;
      end
      if (rsp.wready && req.wvalid) begin
        for (int b = 0; b < 8; b++)
          if (req.wstrb[b]) mem[idx(w_addr)][b*8 +: 8] <= req.wdata[b*8 +: 8];
        w_addr <= w_addr + 8;
        w_left <= w_left - 1;
        if (req.wlast != (w_left == 1)) n_bad_bursts <= n_bad_bursts + 1;
        if (w_left == 1) w_active <= 1'b0;
      end
      if (rsp.wready && req.wvalid && w_left == 1) begin
        if (!(rsp.bvalid && req.bready)) b_pending <= b_pending + 1;
      end else if (rsp.bvalid && req.bready) begin
        b_pending <= b_pending - 1;
      end
    end
  end

endmodule
