// cami_pkg: types and constants shared by the CAMI memory-isolation blocks.
//
// CAMI binds every memory access to the hardware thread that issued it and
// checks that binding against an owner recorded in the page table entry.
// This package fixes the widths of the things that travel between blocks:
//
//   * The global hardware thread ID (TID) is {SM id, warp slot, lane}. The
//     80-SM configuration gives a 7-bit SM field; 64 warp slots of 32 lanes
//     per SM (the usual Volta-class limits, this design's choice) give 6 and
//     5 bits, so a TID is 18 bits and the SCU comparator is 18 bits wide.
//   * Virtual addresses are 48 bits, physical addresses 44 bits, pages 4 KiB,
//     translated by a 4-level table with 9 index bits per level. These sizes
//     are this design's choice.
//   * The extended PTE. A leaf entry is two 64-bit words: word 0 is an
//     ordinary PTE (PFN plus valid and writable bits), word 1 carries the
//     ownership metadata, Owner_Thread_ID followed by Protection_Flag in the
//     upper bits. Keeping the metadata in its own word is why a walk costs one
//     extra memory read per TLB miss. Non-leaf entries are one word (word 0
//     format, PFN of the next table).
package cami_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned VA_W       = 48;
  localparam int unsigned PA_W       = 44;
  localparam int unsigned PAGE_SHIFT = 12;
  localparam int unsigned VPN_W      = VA_W - PAGE_SHIFT;   // 36
  localparam int unsigned PFN_W      = PA_W - PAGE_SHIFT;   // 32
  localparam int unsigned PT_LEVELS  = 4;
  localparam int unsigned PT_IDX_W   = 9;                   // 512 entries per table
  localparam int unsigned DATA_W     = 32;                  // one lane's data word

  localparam int unsigned NUM_SMS    = 80;
  localparam int unsigned NUM_WARPS  = 64;
  localparam int unsigned NUM_LANES  = 32;
  localparam int unsigned SM_ID_W    = $clog2(NUM_SMS);     // 7
  localparam int unsigned WARP_W     = $clog2(NUM_WARPS);   // 6
  localparam int unsigned LANE_W     = $clog2(NUM_LANES);   // 5
  localparam int unsigned TID_W      = SM_ID_W + WARP_W + LANE_W;  // 18

  // Local memory window: thread t's private local memory is the page at
  // LOCAL_BASE + t * 4 KiB. The window covers 2^TID_W pages (1 GiB).
  localparam logic [VA_W-1:0] LOCAL_BASE = 48'h7F00_0000_0000;
  localparam int unsigned LOCAL_OFS_W = PAGE_SHIFT;         // bytes of local memory per thread, log2

  // ---------------------------------------------------------------- types
  typedef logic [VA_W-1:0]   va_t;
  typedef logic [PA_W-1:0]   pa_t;
  typedef logic [VPN_W-1:0]  vpn_t;
  typedef logic [PFN_W-1:0]  pfn_t;
  typedef logic [DATA_W-1:0] data_t;

  typedef struct packed {
    logic [SM_ID_W-1:0] sm;
    logic [WARP_W-1:0]  warp;
    logic [LANE_W-1:0]  lane;
  } tid_t;

  // Memory instructions seen by the LSU. LDL/STL address local memory by an
  // offset that the LSU turns into a per-thread address; LDG/STG carry a
  // generic virtual address.
  typedef enum logic [1:0] {OP_LDG = 2'd0, OP_STG = 2'd1, OP_LDL = 2'd2, OP_STL = 2'd3} mem_op_e;

  // Why a request was refused.
  typedef enum logic [1:0] {
    CAUSE_NONE     = 2'd0,
    CAUSE_UNMAPPED = 2'd1,   // no valid PTE for the address
    CAUSE_WRITE    = 2'd2,   // store to a page without the writable bit
    CAUSE_OWNER    = 2'd3    // CAMI: protected page owned by another thread
  } cause_e;

  // PTE word 0 (also the format of non-leaf entries).
  typedef struct packed {
    logic [63-PA_W:0] rsv_hi;
    pfn_t             pfn;
    logic [9:0]       rsv_lo;
    logic             w;
    logic             v;
  } pte_w0_t;

  // PTE word 1: ownership metadata.
  typedef struct packed {
    tid_t                  owner;   // Owner_Thread_ID
    logic                  prot;    // Protection_Flag
    logic [62-TID_W:0]     rsv;
  } pte_w1_t;

  // A complete translation as held by the TLB and returned by the PTW.
  typedef struct packed {
    pfn_t pfn;
    logic w;
    tid_t owner;
    logic prot;
  } xlate_t;

  // One lane's request, after the CTU has attached the requester context.
  typedef struct packed {
    tid_t  tid;
    logic  write;
    va_t   va;
    data_t wdata;
  } lane_req_t;

  // A granted request on its way to the memory system.
  typedef struct packed {
    tid_t  tid;
    logic  write;
    pa_t   pa;
    data_t wdata;
  } phys_req_t;

  // Violation record handed to the fault registers.
  typedef struct packed {
    tid_t   tid;
    va_t    va;
    logic   write;
    cause_e cause;
  } fault_info_t;

endpackage
