// cvms_pkg: shared constants and types of the capacitor voltage mapping
// strategy (CVMS) engine.
//
// The CVMS replaces the sorting step of arm-level capacitor voltage balancing
// in a modular multilevel converter (MMC). Every sub-module (SM) position is
// written into one of M FIFO memories chosen by the sub-range its capacitor
// voltage falls in; reading the FIFOs in address order yields a quasi-sorted
// list. This package holds the default sizes (N = 64 SMs per arm and M = 8
// sub-ranges, as in the reference implementation), the fixed-point format of
// the mapping constants, the FIFO cell layout and the AXI channel bundles
// used by the processor interfaces. Widths of the voltage samples, of 1/dV
// and of the AXI buses are this design's own choices.
package cvms_pkg;

  // Default arm size and number of voltage sub-ranges.
  localparam int unsigned N_SM_DEF   = 64;
  localparam int unsigned M_FIFO_DEF = 8;

  // Capacitor voltage sample: unsigned ADC code.
  localparam int unsigned VC_W_DEF     = 16;
  // 1/dV: unsigned fixed point with INV_FRAC fractional bits
  // (address units per voltage LSB). 18 bits fit one DSP multiplier input.
  localparam int unsigned INV_W_DEF    = 18;
  localparam int unsigned INV_FRAC_DEF = 20;

  // Map operator and position generator pipeline depth (registers r1..r3
  // and r4..r6).
  localparam int unsigned MAP_LAT = 3;

  // AXI buses towards the processing system.
  localparam int unsigned AXIL_ADDR_W = 12;
  localparam int unsigned AXI_ADDR_W  = 32;
  localparam int unsigned AXI_DATA_W  = 32;

  // Slave register map (byte addresses). STATUS: [0] engine or list
  // transfer or selection busy, [1] list delivered, [2] selection busy,
  // [3] step done.
  localparam logic [AXIL_ADDR_W-1:0] REG_CTRL   = 12'h000; // [0] start (W1), [1] descending
  localparam logic [AXIL_ADDR_W-1:0] REG_STATUS = 12'h004; // [0] busy, [1] done
  localparam logic [AXIL_ADDR_W-1:0] REG_VCMIN  = 12'h008; // Vc,min code
  localparam logic [AXIL_ADDR_W-1:0] REG_INVDV  = 12'h00C; // 1/dV fixed point
  localparam logic [AXIL_ADDR_W-1:0] REG_DST    = 12'h010; // list destination address
  localparam logic [AXIL_ADDR_W-1:0] REG_BAL    = 12'h014; // [0] step (W1), [1] i_pos,
                                                           // [2] opt_sw, [23:16] n_ref
  localparam logic [AXIL_ADDR_W-1:0] REG_VC0    = 12'h400; // Vc[i] at REG_VC0 + 4*i
  localparam logic [AXIL_ADDR_W-1:0] REG_GATES0 = 12'h800; // gate states, 32 SMs per word

  // Bit of an output list word that carries the SM status.
  localparam int unsigned LIST_INS_BIT = 31;

  // AXI4-Lite slave channels (manager -> subordinate and back).
  typedef struct packed {
    logic [AXIL_ADDR_W-1:0] awaddr;
    logic                   awvalid;
    logic [31:0]            wdata;
    logic [3:0]             wstrb;
    logic                   wvalid;
    logic                   bready;
    logic [AXIL_ADDR_W-1:0] araddr;
    logic                   arvalid;
    logic                   rready;
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

  // AXI4 write-only master channels.
  typedef struct packed {
    logic [AXI_ADDR_W-1:0] awaddr;
    logic [7:0]            awlen;
    logic [2:0]            awsize;
    logic [1:0]            awburst;
    logic                  awvalid;
    logic [AXI_DATA_W-1:0] wdata;
    logic [AXI_DATA_W/8-1:0] wstrb;
    logic                  wlast;
    logic                  wvalid;
    logic                  bready;
  } axi_wreq_t;

  typedef struct packed {
    logic       awready;
    logic       wready;
    logic [1:0] bresp;
    logic       bvalid;
  } axi_wrsp_t;

endpackage
