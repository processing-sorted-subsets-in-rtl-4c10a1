// ssa_pkg: types and constants shared by the sorted-subset accelerator.
//
// The accelerator extracts, from a large set of 32-bit integers held in DDR
// memory, the Lmax largest and the Lmin smallest items, optionally keeping
// only items that fall between a lower bound l and an upper bound u.
// Data arrive over a 64-bit AXI high-performance (HP) port, two items per
// beat; the processor configures the accelerator over a 32-bit AXI4-Lite
// general-purpose (GP) port. This package holds the item type, the bus
// bundles of both ports (as packed structs, so the top level can carry them
// as plain ports) and the register map of the GP port.
//
// Item width, beat width and the HP burst limit follow the document (32-bit
// items, 64-bit HP ports, AXI3 HP ports of the Zynq-7000). The register
// map and its addresses are this design's own choice.
package ssa_pkg;

  localparam int unsigned ITEM_W  = 32;          // width of one data item
  localparam int unsigned BEAT_W  = 64;          // width of one AXI HP beat
  localparam int unsigned LANES   = BEAT_W / ITEM_W;  // items per beat
  localparam int unsigned ADDR_W  = 32;          // AXI address width
  localparam int unsigned HP_MAX_BURST = 16;     // AXI3 burst limit (beats)

  typedef logic [ITEM_W-1:0] item_t;
  typedef logic [BEAT_W-1:0] beat_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // ---------------------------------------------------------------- AXI4-Lite
  typedef struct packed {
    addr_t       awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    addr_t       araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  // ---------------------------------------------------------------- AXI3 HP
  typedef struct packed {
    addr_t       araddr;
    logic [3:0]  arlen;
    logic [2:0]  arsize;
    logic [1:0]  arburst;
    logic        arvalid;
    logic        rready;
    addr_t       awaddr;
    logic [3:0]  awlen;
    logic [2:0]  awsize;
    logic [1:0]  awburst;
    logic        awvalid;
    beat_t       wdata;
    logic [7:0]  wstrb;
    logic        wlast;
    logic        wvalid;
    logic        bready;
  } axi_hp_req_t;

  typedef struct packed {
    logic        arready;
    beat_t       rdata;
    logic [1:0]  rresp;
    logic        rlast;
    logic        rvalid;
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
  } axi_hp_rsp_t;

  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [2:0] AXI_SIZE_8B    = 3'd3;
  localparam logic [1:0] AXI_RESP_OKAY  = 2'b00;

  // ---------------------------------------------------- GP register map
  // Byte offsets of the 32-bit registers seen by the processor.
  localparam logic [5:0] REG_CTRL     = 6'h00; // W: bit0 start, bit1 clear irq
  localparam logic [5:0] REG_STATUS   = 6'h04; // R: bit0 busy, bit1 done, bit2 error
  localparam logic [5:0] REG_MODE     = 6'h08; // bit0 use lower bound, bit1 use upper bound, bit2 copy
  localparam logic [5:0] REG_SRC      = 6'h0C; // DDR byte address of set A
  localparam logic [5:0] REG_DST      = 6'h10; // DDR byte address of the result (4-byte aligned)
  localparam logic [5:0] REG_NWORDS   = 6'h14; // number of 32-bit items in set A
  localparam logic [5:0] REG_LMAX     = 6'h18; // size of the maximum subset to return
  localparam logic [5:0] REG_LMIN     = 6'h1C; // size of the minimum subset to return
  localparam logic [5:0] REG_LOWER    = 6'h20; // lower bound l
  localparam logic [5:0] REG_UPPER    = 6'h24; // upper bound u
  localparam logic [5:0] REG_ADMITTED = 6'h28; // R: items that passed the filter
  localparam logic [5:0] REG_IRQEN    = 6'h2C; // bit0 interrupt enable
  localparam logic [5:0] REG_CYCLES   = 6'h30; // R: clock cycles of the last operation

  // Operation settings handed from the GP register bank to the datapath.
  typedef struct packed {
    logic        use_lower;
    logic        use_upper;
    logic        copy;        // write filtered items back instead of subsets
    item_t       lower;
    item_t       upper;
    addr_t       src_addr;
    addr_t       dst_addr;
    logic [31:0] n_words;
    logic [15:0] lmax;
    logic [15:0] lmin;
  } op_cfg_t;

endpackage
