// cami_mmu: context-aware MMU with the CAMI security check.
//
// Each lane request from the Context Tracking Unit carries its virtual
// address and the requester thread ID. The MMU translates the address and
// then, after translation and before the request leaves for the memory
// system, lets the SCU compare the requester ID with the owner ID that came
// with the translation. This is the document's check workflow:
//
//   stage 1 (lookup): the TLB is probed with the VPN. On a hit the mapping
//     and the stored owner ID move on to stage 2. On a miss the stage stalls
//     and the page table walker fetches the extended PTE (mapping plus
//     ownership word) from memory; a valid result is written into the TLB
//     and used directly. The SCU is idle while the walker runs.
//   stage 2 (check): the request is refused if the page is not mapped, if
//     the SCU finds a protected page owned by another thread, or if a store
//     hits a page without the writable bit (in that priority). A permitted
//     request leaves on out_valid/out_ready with its physical address; a
//     refused one is reported for one cycle on fault_valid and discarded.
//     A request from a warp that is already halted is discarded silently
//     (drop), so nothing of a faulting warp reaches memory after its fault.
//
// Timing: on a TLB hit a request offered in cycle c appears on out_valid or
// fault_valid in cycle c+2; the pipeline accepts one request per cycle. A
// miss adds the walk (2 * (PT_LEVELS + 1) + 1 cycles with a one-cycle
// memory). The two-stage split, the fault priority and the drop of halted
// warps' requests are this design's choices.
//
// Events ev_hit, ev_miss and drop pulse once per TLB hit, walk started and
// dropped request, for performance counting.
module cami_mmu
  import cami_pkg::*;
#(
  parameter int unsigned TLB_ENTRIES = 32
)(
  input  logic                 clk,
  input  logic                 rst_n,
  // lane requests from the CTU
  input  logic                 req_valid,
  output logic                 req_ready,
  input  lane_req_t            req,
  // configuration and shootdown
  input  pfn_t                 ptbr_pfn,
  input  logic                 inv_all,
  input  logic                 inv_valid,
  input  vpn_t                 inv_vpn,
  input  logic [NUM_WARPS-1:0] halted,
  // granted requests to L2/DRAM
  output logic                 out_valid,
  input  logic                 out_ready,
  output phys_req_t            out,
  // refused requests
  output logic                 fault_valid,
  output fault_info_t          fault_info,
  output logic                 drop,
  output logic                 ev_hit,
  output logic                 ev_miss,
  // page-table read port
  output logic                 pt_req_valid,
  input  logic                 pt_req_ready,
  output pa_t                  pt_req_addr,
  input  logic                 pt_rsp_valid,
  input  logic [63:0]          pt_rsp_data
);

  // ------------------------------------------------------------ stage 1
  logic      s1_valid_q, s1_walked_q, s1_wres_valid_q;
  lane_req_t s1_req_q;
  xlate_t    s1_wres_q;

  logic   tlb_hit;
  xlate_t tlb_xlate;
  logic   ptw_busy, ptw_done, ptw_res_valid, ptw_start;
  xlate_t ptw_res;

  cami_tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst_n,
    .lk_vpn     (s1_req_q.va[VA_W-1:PAGE_SHIFT]),
    .lk_hit     (tlb_hit),
    .lk_xlate   (tlb_xlate),
    .fill_valid (ptw_done && ptw_res_valid),
    .fill_vpn   (s1_req_q.va[VA_W-1:PAGE_SHIFT]),
    .fill_xlate (ptw_res),
    .inv_all, .inv_valid, .inv_vpn
  );

  cami_ptw u_ptw (
    .clk, .rst_n,
    .start         (ptw_start),
    .vpn           (s1_req_q.va[VA_W-1:PAGE_SHIFT]),
    .ptbr_pfn,
    .busy          (ptw_busy),
    .done          (ptw_done),
    .res_valid     (ptw_res_valid),
    .res_xlate     (ptw_res),
    .mem_req_valid (pt_req_valid),
    .mem_req_ready (pt_req_ready),
    .mem_req_addr  (pt_req_addr),
    .mem_rsp_valid (pt_rsp_valid),
    .mem_rsp_data  (pt_rsp_data)
  );

  logic   s1_have, s1_map_valid, s1_adv;
  xlate_t s1_xlate;
  logic   s2_free;

  always_comb begin
    s1_have      = s1_valid_q && (s1_walked_q || tlb_hit);
    s1_map_valid = s1_walked_q ? s1_wres_valid_q : 1'b1;
    s1_xlate     = s1_walked_q ? s1_wres_q : tlb_xlate;
    s1_adv       = s1_have && s2_free;
    ptw_start    = s1_valid_q && !s1_walked_q && !tlb_hit && !ptw_busy;
    req_ready    = !s1_valid_q || s1_adv;
  end

  assign ev_miss = ptw_start;
  assign ev_hit  = s1_adv && !s1_walked_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid_q      <= 1'b0;
      s1_walked_q     <= 1'b0;
      s1_wres_valid_q <= 1'b0;
      s1_req_q        <= '0;
      s1_wres_q       <= '0;
    end else begin
      if (req_valid && req_ready) begin
        s1_valid_q  <= 1'b1;
        s1_walked_q <= 1'b0;
        s1_req_q    <= req;
      end else if (s1_adv) begin
        s1_valid_q  <= 1'b0;
        s1_walked_q <= 1'b0;
      end else if (ptw_done && s1_valid_q) begin
        s1_walked_q     <= 1'b1;
        s1_wres_valid_q <= ptw_res_valid;
        s1_wres_q       <= ptw_res;
      end
    end
  end

  // ------------------------------------------------------------ stage 2
  logic      s2_valid_q, s2_map_valid_q;
  lane_req_t s2_req_q;
  xlate_t    s2_xlate_q;

  logic   scu_permit, scu_fault;
  logic   s2_drop, s2_refuse;
  cause_e s2_cause;

  cami_scu u_scu (
    .check_en      (s2_valid_q && s2_map_valid_q),
    .requester_tid (s2_req_q.tid),
    .owner_tid     (s2_xlate_q.owner),
    .prot_flag     (s2_xlate_q.prot),
    .permit        (scu_permit),
    .fault         (scu_fault)
  );

  always_comb begin
    s2_drop = s2_valid_q && halted[s2_req_q.tid.warp];
    if (!s2_map_valid_q)                      s2_cause = CAUSE_UNMAPPED;
    else if (scu_fault)                       s2_cause = CAUSE_OWNER;
    else if (s2_req_q.write && !s2_xlate_q.w) s2_cause = CAUSE_WRITE;
    else                                      s2_cause = CAUSE_NONE;
    s2_refuse = s2_valid_q && !s2_drop && (s2_cause != CAUSE_NONE);

    out_valid = s2_valid_q && !s2_drop && scu_permit && (s2_cause == CAUSE_NONE);
    out.tid   = s2_req_q.tid;
    out.write = s2_req_q.write;
    out.pa    = {s2_xlate_q.pfn, s2_req_q.va[PAGE_SHIFT-1:0]};
    out.wdata = s2_req_q.wdata;

    fault_valid      = s2_refuse;
    fault_info.tid   = s2_req_q.tid;
    fault_info.va    = s2_req_q.va;
    fault_info.write = s2_req_q.write;
    fault_info.cause = s2_cause;
    drop             = s2_drop;

    s2_free = !s2_valid_q || s2_drop || s2_refuse || (out_valid && out_ready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid_q     <= 1'b0;
      s2_map_valid_q <= 1'b0;
      s2_req_q       <= '0;
      s2_xlate_q     <= '0;
    end else if (s2_free) begin
      s2_valid_q     <= s1_adv;
      s2_map_valid_q <= s1_map_valid;
      s2_req_q       <= s1_req_q;
      s2_xlate_q     <= s1_xlate;
    end
  end

  // a granted request stays offered, unchanged, until memory takes it or
  // its warp is halted
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> (out_valid && $stable(out)) || drop);
  // nothing is ever both granted and refused
  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n)
    !(out_valid && fault_valid));

endmodule
