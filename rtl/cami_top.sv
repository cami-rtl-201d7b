// cami_top: the memory access path of one streaming multiprocessor with
// CAMI thread-level isolation.
//
//   issue --> cami_ctu (in the LSU) --> cami_mmu (TLB, PTW, SCU) --> L2/DRAM
//                  ^                         |
//                  |                         v fault
//                  +--- halted -------- cami_fault_regs <--> system software
//
// The CTU splits each warp memory instruction into per-lane requests and
// tags each with the issuing thread's global ID. The MMU translates the
// address; the translation carries the page's Owner_Thread_ID and
// Protection_Flag from the extended PTE, and the SCU permits the access only
// if the page is unprotected or owned by the requester. A refused access is
// recorded in the violation registers and halts its warp; the CTU and the MMU
// then discard the warp's remaining requests until software resumes it.
//
// The execution units, the L2/DRAM and the driver that writes the page
// tables are outside this design: the warp instruction port, the data
// request port, the page-table read port and the software register port
// are brought out. Block connections follow the CAMI architecture; the
// port protocols (valid/ready) are this design's choice.
//
// Timing: a lane whose translation hits in the TLB reaches mem_valid (or is
// refused) two cycles after the CTU offers it; the CTU offers the first lane
// one cycle after it accepts the instruction.
module cami_top
  import cami_pkg::*;
#(
  parameter logic [SM_ID_W-1:0] SM_ID       = '0,
  parameter int unsigned        TLB_ENTRIES = 32
)(
  input  logic                 clk,
  input  logic                 rst_n,
  // warp memory instructions from the execution units
  input  logic                 instr_valid,
  output logic                 instr_ready,
  input  logic [WARP_W-1:0]    instr_warp,
  input  mem_op_e              instr_op,
  input  logic [NUM_LANES-1:0] instr_mask,
  input  va_t                  instr_addr  [NUM_LANES],
  input  data_t                instr_wdata [NUM_LANES],
  output logic                 squash,
  output logic [NUM_WARPS-1:0] halted,
  // granted requests to L2/DRAM
  output logic                 mem_valid,
  input  logic                 mem_ready,
  output phys_req_t            mem_req,
  // page-table reads
  output logic                 pt_req_valid,
  input  logic                 pt_req_ready,
  output pa_t                  pt_req_addr,
  input  logic                 pt_rsp_valid,
  input  logic [63:0]          pt_rsp_data,
  // translation configuration and TLB shootdown
  input  pfn_t                 ptbr_pfn,
  input  logic                 inv_all,
  input  logic                 inv_valid,
  input  vpn_t                 inv_vpn,
  // violation registers
  input  logic [2:0]           sw_addr,
  input  logic                 sw_we,
  input  logic [31:0]          sw_wdata,
  output logic [31:0]          sw_rdata,
  output logic                 fault_irq,
  // event pulses for performance counters
  output logic                 ev_hit,
  output logic                 ev_miss,
  output logic                 ev_drop
);

  logic        lane_valid, lane_ready;
  lane_req_t   lane_req;
  logic        fault_valid;
  fault_info_t fault_info;

  cami_ctu #(.SM_ID(SM_ID)) u_ctu (
    .clk, .rst_n,
    .instr_valid, .instr_ready, .instr_warp, .instr_op, .instr_mask,
    .instr_addr, .instr_wdata,
    .halted,
    .squash,
    .req_valid (lane_valid),
    .req_ready (lane_ready),
    .req       (lane_req)
  );

  cami_mmu #(.TLB_ENTRIES(TLB_ENTRIES)) u_mmu (
    .clk, .rst_n,
    .req_valid   (lane_valid),
    .req_ready   (lane_ready),
    .req         (lane_req),
    .ptbr_pfn, .inv_all, .inv_valid, .inv_vpn,
    .halted,
    .out_valid   (mem_valid),
    .out_ready   (mem_ready),
    .out         (mem_req),
    .fault_valid (fault_valid),
    .fault_info  (fault_info),
    .drop        (ev_drop),
    .ev_hit, .ev_miss,
    .pt_req_valid, .pt_req_ready, .pt_req_addr, .pt_rsp_valid, .pt_rsp_data
  );

  cami_fault_regs u_fault_regs (
    .clk, .rst_n,
    .fault_valid, .fault_info,
    .halted,
    .sw_addr, .sw_we, .sw_wdata, .sw_rdata
  );

  assign fault_irq = fault_valid;

endmodule
