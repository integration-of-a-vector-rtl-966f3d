// magia_pkg: types and constants shared by the MAGIA tile.
//
// Holds the tile address map (peripheral control region, stack, L1 scratchpad,
// L2 window), the L1 geometry (32 word-interleaved banks of 32 KiB), the Event
// Unit bit assignment of every event source, and the request/response structs
// of the 32-bit OBI-style bus used on every port of the tile (OBI crossbar, HCI
// master ports, peripheral slaves). The address map and the event bit numbers
// are the published ones; the struct layout (one transaction in flight per
// master, response one or more cycles after the grant, `aid` echoed back as
// `rid`) is this design's choice.
package magia_pkg;

  // ---------------- bus ----------------
  localparam int unsigned AW  = 32;
  localparam int unsigned DW  = 32;
  localparam int unsigned IDW = 4;

  typedef struct packed {
    logic            req;
    logic [AW-1:0]   addr;
    logic            we;
    logic [DW/8-1:0] be;
    logic [DW-1:0]   wdata;
    logic [IDW-1:0]  aid;
  } obi_req_t;

  typedef struct packed {
    logic            gnt;
    logic            rvalid;
    logic [DW-1:0]   rdata;
    logic            err;
    logic [IDW-1:0]  rid;
  } obi_rsp_t;

  // ---------------- address map (tile view) ----------------
  localparam logic [AW-1:0] REDMULE_BASE = 32'h0000_0100;  // 256 B
  localparam logic [AW-1:0] IDMA_BASE    = 32'h0000_0200;  // 1 KiB, two channels
  localparam logic [AW-1:0] IDMA_A2O_BASE = 32'h0000_0200; // L2 -> L1
  localparam logic [AW-1:0] IDMA_O2A_BASE = 32'h0000_0400; // L1 -> L2
  localparam logic [AW-1:0] FSYNC_BASE   = 32'h0000_0600;  // 256 B
  localparam logic [AW-1:0] EU_BASE      = 32'h0000_0700;  // 4 KiB
  localparam logic [AW-1:0] EU_END       = 32'h0000_16FF;
  localparam logic [AW-1:0] SPATZ_BASE   = 32'h0000_1700;  // 256 B
  localparam logic [AW-1:0] STACK_BASE   = 32'h0001_0000;  // 64 KiB, held in L1
  localparam logic [AW-1:0] L1_END       = 32'h000F_FFFF;
  localparam logic [AW-1:0] L2_BASE      = 32'hC000_0000;
  localparam logic [AW-1:0] SPATZ_BOOT_ADDR = 32'h1000_0000;

  // ---------------- L1 geometry ----------------
  localparam int unsigned N_BANKS    = 32;
  localparam int unsigned BANK_WORDS = 8192;  // 32 KiB / 4 B

  // ---------------- Spatz CC configuration ----------------
  localparam int unsigned SPATZ_N_FPU = 4;
  localparam int unsigned SPATZ_N_IPU = 1;
  localparam bit          SPATZ_RVD   = 1'b0;
  localparam int unsigned SPATZ_NUM_FU = (SPATZ_N_FPU > SPATZ_N_IPU) ? SPATZ_N_FPU : SPATZ_N_IPU;
  localparam int unsigned SPATZ_HCI_PORTS = (SPATZ_NUM_FU + 1) * (SPATZ_RVD ? 2 : 1);  // 5

  // RedMulE: 512-bit HCI port = 16 x 32-bit lanes
  localparam int unsigned REDMULE_HCI_PORTS = 512 / 32;
  // iDMA: one 32-bit L1 port per channel
  localparam int unsigned IDMA_HCI_PORTS = 2;

  // ---------------- Event Unit bit positions ----------------
  localparam int unsigned EVT_IDMA_A2O_DONE  = 2;
  localparam int unsigned EVT_IDMA_O2A_DONE  = 3;
  localparam int unsigned EVT_SPATZ_DONE     = 8;
  localparam int unsigned EVT_REDMULE_BUSY   = 9;
  localparam int unsigned EVT_REDMULE_DONE   = 10;
  localparam int unsigned EVT_REDMULE_EVT    = 11;
  localparam int unsigned EVT_SPATZ_START    = 23;
  localparam int unsigned EVT_FSYNC_DONE     = 24;
  localparam int unsigned EVT_FSYNC_ERROR    = 25;
  localparam int unsigned EVT_IDMA_A2O_ERROR = 26;
  localparam int unsigned EVT_IDMA_O2A_ERROR = 27;
  localparam int unsigned EVT_IDMA_A2O_START = 28;
  localparam int unsigned EVT_IDMA_O2A_START = 29;
  localparam int unsigned EVT_IDMA_A2O_BUSY  = 30;
  localparam int unsigned EVT_IDMA_O2A_BUSY  = 31;

  // ---------------- peripheral job descriptors ----------------
  typedef struct packed {
    logic [31:0] x_ptr;
    logic [31:0] w_ptr;
    logic [31:0] z_ptr;
    logic [31:0] mcfg0;   // M and K
    logic [31:0] mcfg1;   // N
    logic [31:0] arith;   // operation and format
  } redmule_cfg_t;

  typedef struct packed {
    logic [31:0] conf;
    logic [31:0] dst_addr;
    logic [31:0] src_addr;
    logic [31:0] length;
    logic [31:0] dst_stride_2;
    logic [31:0] src_stride_2;
    logic [31:0] reps_2;
    logic [31:0] dst_stride_3;
    logic [31:0] src_stride_3;
    logic [31:0] reps_3;
    logic [31:0] id;
  } idma_job_t;

  // Event Unit register offsets (within the 4 KiB window)
  localparam logic [11:0] EU_CORE_MASK          = 12'h000;
  localparam logic [11:0] EU_CORE_IRQ_MASK      = 12'h00C;
  localparam logic [11:0] EU_CORE_BUFFER        = 12'h01C;
  localparam logic [11:0] EU_CORE_BUFFER_MASKED = 12'h020;
  localparam logic [11:0] EU_CORE_BUFFER_IRQ_MASKED = 12'h024;
  localparam logic [11:0] EU_CORE_BUFFER_CLEAR  = 12'h028;
  localparam logic [11:0] EU_CORE_EVENT_WAIT    = 12'h038;
  localparam logic [11:0] EU_CORE_EVENT_WAIT_CLEAR = 12'h03C;

  // Byte-enable write merge
  function automatic logic [31:0] be_merge(logic [31:0] old, logic [31:0] wd, logic [3:0] be);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = be[i] ? wd[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

endpackage
