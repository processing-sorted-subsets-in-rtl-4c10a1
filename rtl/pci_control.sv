// pci_control: mailbox between the host computer and the processor.
//
// An AXI4-Lite register bank reached both by the host (through the PCIe
// bridge and the AXI interconnect) and by the processor. The host, after
// copying the set into DDR memory, writes 1 to DOORBELL (offset 0x0); this
// raises irq_ps, the interrupt that tells the processor the data are in
// place. The processor acknowledges by writing 1 to IRQ_ACK (0x8). When the
// result is back in DDR memory the processor sets FLAG (0x4) to 1; the host
// polls FLAG and, after fetching the result, writes 0 to it. MESSAGE (0xC)
// is a free 32-bit word the host can use to pass the requested operation
// to the processor at run time. Reads return DOORBELL pending, FLAG and
// MESSAGE at the same offsets. Registers change one cycle after the write.
//
// Doorbell, interrupt and flag follow the document's description of the
// PCI control unit; the offsets and the acknowledge register are this
// design's own.
module pci_control
  import ssa_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp,
  output logic      irq_ps,     // doorbell interrupt to the processor
  output logic      flag        // result-ready flag polled by the host
);

  localparam logic [3:0] OFF_DOORBELL = 4'h0;
  localparam logic [3:0] OFF_FLAG     = 4'h4;
  localparam logic [3:0] OFF_IRQ_ACK  = 4'h8;
  localparam logic [3:0] OFF_MESSAGE  = 4'hC;

  logic        wr_en, rd_en;
  logic [3:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;
  logic [31:0] message_q;

  axil_reg_port #(.AW(4)) u_port (
    .clk, .rst_n, .req, .rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_ps    <= 1'b0;
      flag      <= 1'b0;
      message_q <= '0;
    end else if (wr_en) begin
      unique case (wr_addr & 4'hC)
        OFF_DOORBELL: if (wr_strb[0] && wr_data[0]) irq_ps <= 1'b1;
        OFF_FLAG:     if (wr_strb[0]) flag <= wr_data[0];
        OFF_IRQ_ACK:  if (wr_strb[0] && wr_data[0]) irq_ps <= 1'b0;
        OFF_MESSAGE:  for (int b = 0; b < 4; b++)
                        if (wr_strb[b]) message_q[b*8 +: 8] <= wr_data[b*8 +: 8];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (rd_addr & 4'hC)
      OFF_DOORBELL: rd_data = {31'd0, irq_ps};
      OFF_FLAG:     rd_data = {31'd0, flag};
      OFF_MESSAGE:  rd_data = message_q;
      default:      rd_data = '0;
    endcase
  end

endmodule
