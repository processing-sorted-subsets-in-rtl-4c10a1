// hp_control: AXI HP master that moves data between DDR memory and the
// accelerator.
//
// Read side: after rd_start, reads ceil(n_words/2) 64-bit beats from
// src_addr. Addresses are issued as INCR bursts of up to 16 beats (the AXI3
// limit of the HP ports) that never cross a 128-byte boundary, so no burst
// crosses a 4 KB page; address requests run ahead of the data. Each read
// beat is passed on to the loader as it arrives (out_valid/out_ready drive
// rvalid/rready directly), with out_keep marking the lanes that hold items
// of the set (only the upper lane of the final beat can be empty) and
// out_last marking the final beat. rd_done pulses when that beat is taken.
//
// Write side: after wr_start, writes wr_words 32-bit words from dst_addr
// (4-byte aligned) on, as whole beats in the same kind of bursts. When
// dst_addr[2] is set (wr_off), the first word goes to the upper lane of the
// first beat. For beat b the master shows wr_beat_idx = b and takes the
// beat's data from wr_beat_data in the same cycle; lane l of beat b carries
// word 2b + l - wr_off, and the byte strobes of lanes outside the words are
// cleared. Each burst's address is sent, then
// its data; the next burst follows without waiting for the response, and
// wr_done pulses when every write response has come back. A response other
// than OKAY on either side sets the sticky error output (cleared by rd_start).
//
// The use of HP ports for both directions and their 64-bit width follow the
// document; the burst policy and the one-beat-at-a-time flow are this
// design's own.
module hp_control
  import ssa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  output axi_hp_req_t      hp_req,
  input  axi_hp_rsp_t      hp_rsp,
  // read side
  input  logic             rd_start,
  input  addr_t            src_addr,
  input  logic [31:0]      n_words,
  output logic             out_valid,
  input  logic             out_ready,
  output beat_t            out_data,
  output logic [LANES-1:0] out_keep,
  output logic             out_last,
  output logic             rd_done,
  // write side
  input  logic             wr_start,
  input  addr_t            dst_addr,
  input  logic [31:0]      wr_words,
  output logic [31:0]      wr_beat_idx,
  output logic             wr_off,      // first word goes to the upper lane
  input  beat_t            wr_beat_data,
  output logic             wr_done,
  output logic             error
);

  // number of beats of the next burst: up to 16, not past a 128-byte line
  function automatic logic [4:0] burst_beats(addr_t a, logic [31:0] remaining);
    logic [4:0] to_line;
    to_line = 5'(HP_MAX_BURST) - {1'b0, a[6:3]};
    return (remaining < 32'(to_line)) ? remaining[4:0] : to_line;
  endfunction

  // ------------------------------------------------------------ read side
  addr_t       ar_addr_q;
  logic [31:0] ar_left_q;      // beats not yet requested
  logic [31:0] r_left_q;       // beats not yet received
  logic        n_odd_q;
  logic        ar_valid_q;
  logic [4:0]  ar_beats_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_addr_q  <= '0;
      ar_left_q  <= '0;
      r_left_q   <= '0;
      n_odd_q    <= 1'b0;
      ar_valid_q <= 1'b0;
      ar_beats_q <= '0;
    end else if (rd_start) begin
      ar_addr_q  <= {src_addr[ADDR_W-1:3], 3'b000};
      ar_left_q  <= (n_words + 32'd1) >> 1;
      r_left_q   <= (n_words + 32'd1) >> 1;
      n_odd_q    <= n_words[0];
      ar_valid_q <= 1'b0;
    end else begin
      if (!ar_valid_q && ar_left_q != 0) begin
        ar_valid_q <= 1'b1;
        ar_beats_q <= burst_beats(ar_addr_q, ar_left_q);
      end else if (ar_valid_q && hp_rsp.arready) begin
        ar_valid_q <= 1'b0;
        ar_addr_q  <= ar_addr_q + (addr_t'(ar_beats_q) << 3);
        ar_left_q  <= ar_left_q - 32'(ar_beats_q);
      end
      if (hp_rsp.rvalid && out_ready && r_left_q != 0) r_left_q <= r_left_q - 32'd1;
    end
  end

  assign hp_req.araddr  = ar_addr_q;
  assign hp_req.arlen   = 4'(ar_beats_q - 5'd1);
  assign hp_req.arsize  = AXI_SIZE_8B;
  assign hp_req.arburst = AXI_BURST_INCR;
  assign hp_req.arvalid = ar_valid_q;
  assign hp_req.rready  = out_ready;

  assign out_valid = hp_rsp.rvalid;
  assign out_data  = hp_rsp.rdata;
  assign out_last  = (r_left_q == 32'd1);
  assign out_keep  = (out_last && n_odd_q) ? LANES'(1) : '1;
  assign rd_done   = hp_rsp.rvalid && out_ready && out_last;

  // ----------------------------------------------------------- write side
  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_t;
  wstate_t     ws_q;
  addr_t       aw_addr_q;
  logic [31:0] wb_idx_q;       // next beat to send
  logic [31:0] wb_total_q;
  logic [4:0]  aw_beats_q;
  logic [4:0]  w_cnt_q;        // beats sent in the current burst
  logic [31:0] b_left_q;       // responses still expected
  logic        words_odd_q;    // final beat has an empty upper lane
  logic        off_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws_q        <= W_IDLE;
      aw_addr_q   <= '0;
      wb_idx_q    <= '0;
      wb_total_q  <= '0;
      aw_beats_q  <= '0;
      w_cnt_q     <= '0;
      b_left_q    <= '0;
      words_odd_q <= 1'b0;
      off_q       <= 1'b0;
      wr_done     <= 1'b0;
    end else begin
      wr_done <= 1'b0;
      if (hp_rsp.bvalid && b_left_q != 0) b_left_q <= b_left_q - 32'd1;
      unique case (ws_q)
        W_IDLE: if (wr_start) begin
          aw_addr_q   <= {dst_addr[ADDR_W-1:3], 3'b000};
          wb_idx_q    <= '0;
          wb_total_q  <= (wr_words + 32'(dst_addr[2]) + 32'd1) >> 1;
          words_odd_q <= wr_words[0] ^ dst_addr[2];
          off_q       <= dst_addr[2];
          b_left_q    <= '0;
          ws_q        <= (wr_words == 0) ? W_RESP : W_ADDR;
          aw_beats_q  <= burst_beats({dst_addr[ADDR_W-1:3], 3'b000},
                                     (wr_words + 32'(dst_addr[2]) + 32'd1) >> 1);
        end
        W_ADDR: if (hp_rsp.awready) begin
          ws_q     <= W_DATA;
          w_cnt_q  <= '0;
          // one more response expected (a response in this same cycle is
          // for an earlier burst and was counted down above)
          b_left_q <= b_left_q + 32'd1 - 32'(hp_rsp.bvalid && b_left_q != 0);
        end
        W_DATA: if (hp_rsp.wready) begin
          wb_idx_q <= wb_idx_q + 32'd1;
          w_cnt_q  <= w_cnt_q + 5'd1;
          if (w_cnt_q + 5'd1 == aw_beats_q) begin
            aw_addr_q <= aw_addr_q + (addr_t'(aw_beats_q) << 3);
            if (wb_idx_q + 32'd1 == wb_total_q) begin
              ws_q <= W_RESP;
            end else begin
              ws_q       <= W_ADDR;
              aw_beats_q <= burst_beats(aw_addr_q + (addr_t'(aw_beats_q) << 3),
                                        wb_total_q - wb_idx_q - 32'd1);
            end
          end
        end
        W_RESP: if (b_left_q == 0 || (b_left_q == 1 && hp_rsp.bvalid)) begin
          ws_q    <= W_IDLE;
          wr_done <= 1'b1;
        end
        default: ws_q <= W_IDLE;
      endcase
    end
  end

  logic w_final;
  assign w_final = (wb_idx_q + 32'd1 == wb_total_q);

  assign hp_req.awaddr  = aw_addr_q;
  assign hp_req.awlen   = 4'(aw_beats_q - 5'd1);
  assign hp_req.awsize  = AXI_SIZE_8B;
  assign hp_req.awburst = AXI_BURST_INCR;
  assign hp_req.awvalid = (ws_q == W_ADDR);
  assign hp_req.wvalid  = (ws_q == W_DATA);
  assign hp_req.wdata   = wr_beat_data;
  assign hp_req.wstrb   = {(w_final && words_odd_q) ? 4'h0 : 4'hF,
                           (wb_idx_q == 0 && off_q) ? 4'h0 : 4'hF};
  assign hp_req.wlast   = (w_cnt_q + 5'd1 == aw_beats_q);
  assign hp_req.bready  = 1'b1;
  assign wr_beat_idx    = wb_idx_q;
  assign wr_off         = off_q;

  // --------------------------------------------------------------- errors
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) error <= 1'b0;
    else if (rd_start) error <= 1'b0;
    else if ((hp_rsp.rvalid && out_ready && hp_rsp.rresp != AXI_RESP_OKAY) ||
             (hp_rsp.bvalid && hp_rsp.bresp != AXI_RESP_OKAY)) error <= 1'b1;
  end

  // AXI rule: a request, once valid, stays valid and unchanged until accepted.
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    hp_req.arvalid && !hp_rsp.arready |=> hp_req.arvalid && $stable(hp_req.araddr) && $stable(hp_req.arlen));
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    hp_req.awvalid && !hp_rsp.awready |=> hp_req.awvalid && $stable(hp_req.awaddr) && $stable(hp_req.awlen));
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    hp_req.wvalid && !hp_rsp.wready |=> hp_req.wvalid && $stable(hp_req.wlast));

endmodule
