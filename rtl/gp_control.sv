// gp_control: register bank the processor uses to run the accelerator.
//
// Sits on the AXI GP port (AXI4-Lite, 32-bit). Software writes the
// operation settings - DDR addresses of the set and of the result, the
// number of items, the sizes Lmax and Lmin of the subsets to return, the
// bounds l and u and which of them to apply, and whether the filtered items
// themselves are to be written back (copy) - and then writes 1 to bit 0 of
// CTRL, which gives a one-cycle start pulse to the control FSM. The
// register map is in ssa_pkg (REG_*). When the FSM reports completion
// (done_pulse) the DONE bit of STATUS is set and, if enabled in IRQEN, the
// interrupt line to the processor goes high; writing 1 to CTRL bit 1, or a
// new start, clears it. STATUS also shows busy and a sticky bus-error bit;
// ADMITTED and CYCLES report how many items passed the filter and how many
// clock cycles the last operation took.
//
// Settings are held in cfg and must not be changed while busy. A start
// while busy is ignored. The use of the GP port for settings and start
// requests, and the interrupt on completion, follow the document; the
// register layout is this design's own.
module gp_control
  import ssa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   req,
  output axil_rsp_t   rsp,
  output op_cfg_t     cfg,
  output logic        start,        // one-cycle start request
  input  logic        busy,
  input  logic        done_pulse,   // operation finished
  input  logic        error,        // bus error seen by the HP master
  input  logic [31:0] admitted,
  input  logic [31:0] cycles,
  output logic        irq           // completion interrupt to the processor
);

  logic        wr_en, rd_en;
  logic [5:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;
  logic        done_q, irq_en_q;

  axil_reg_port #(.AW(6)) u_port (
    .clk, .rst_n, .req, .rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  // byte-lane merge of a register write
  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] s);
    for (int b = 0; b < 4; b++) if (s[b]) old[b*8 +: 8] = d[b*8 +: 8];
    return old;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg      <= '0;
      start    <= 1'b0;
      done_q   <= 1'b0;
      irq_en_q <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done_pulse) done_q <= 1'b1;
      if (wr_en) begin
        unique case (wr_addr & 6'h3C)
          REG_CTRL: begin
            if (wr_strb[0] && wr_data[0] && !busy) begin
              start  <= 1'b1;
              done_q <= 1'b0;
            end
            if (wr_strb[0] && wr_data[1]) done_q <= 1'b0;
          end
          REG_MODE: if (wr_strb[0]) begin
            cfg.use_lower <= wr_data[0];
            cfg.use_upper <= wr_data[1];
            cfg.copy      <= wr_data[2];
          end
          REG_SRC:    cfg.src_addr <= merge(cfg.src_addr, wr_data, wr_strb);
          REG_DST:    cfg.dst_addr <= merge(cfg.dst_addr, wr_data, wr_strb);
          REG_NWORDS: cfg.n_words  <= merge(cfg.n_words,  wr_data, wr_strb);
          REG_LMAX:   cfg.lmax     <= 16'(merge({16'd0, cfg.lmax}, wr_data, wr_strb));
          REG_LMIN:   cfg.lmin     <= 16'(merge({16'd0, cfg.lmin}, wr_data, wr_strb));
          REG_LOWER:  cfg.lower    <= merge(cfg.lower, wr_data, wr_strb);
          REG_UPPER:  cfg.upper    <= merge(cfg.upper, wr_data, wr_strb);
          REG_IRQEN:  if (wr_strb[0]) irq_en_q <= wr_data[0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_addr & 6'h3C)
      REG_STATUS:   rd_data = {29'd0, error, done_q, busy};
      REG_MODE:     rd_data = {29'd0, cfg.copy, cfg.use_upper, cfg.use_lower};
      REG_SRC:      rd_data = cfg.src_addr;
      REG_DST:      rd_data = cfg.dst_addr;
      REG_NWORDS:   rd_data = cfg.n_words;
      REG_LMAX:     rd_data = {16'd0, cfg.lmax};
      REG_LMIN:     rd_data = {16'd0, cfg.lmin};
      REG_LOWER:    rd_data = cfg.lower;
      REG_UPPER:    rd_data = cfg.upper;
      REG_ADMITTED: rd_data = admitted;
      REG_IRQEN:    rd_data = {31'd0, irq_en_q};
      REG_CYCLES:   rd_data = cycles;
      default:      rd_data = '0;
    endcase
  end

  assign irq = done_q && irq_en_q;

endmodule
