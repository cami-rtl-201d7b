// cami_ptw: hardware page table walker that fetches CAMI ownership metadata.
//
// On a TLB miss the MMU starts a walk with the virtual page number. The
// walker reads one entry per level of a PT_LEVELS-level radix table whose
// root PFN is ptbr_pfn; each level is indexed by PT_IDX_W bits of the VPN,
// most significant first. Non-leaf entries are 8 bytes and point to the next
// table. Leaf entries are extended PTEs of 16 bytes: word 0 is the ordinary
// mapping, word 1 the ownership metadata (Owner_Thread_ID, Protection_Flag),
// so a successful walk makes PT_LEVELS + 1 memory reads. An entry whose valid
// bit is clear ends the walk with res_valid = 0 (page not mapped).
// The multi-level walk and the metadata fetch on a miss follow the document;
// the table geometry and the split leaf entry are this design's choices.
//
// Interfaces:
//   * start (one cycle, while busy is low) with vpn and ptbr_pfn.
//   * memory read port: mem_req_valid / mem_req_ready / mem_req_addr, one
//     request outstanding; mem_rsp_valid / mem_rsp_data return the 64-bit
//     word, any number of cycles later.
//   * done pulses for one cycle with res_valid and res_xlate.
// Timing: with a one-cycle memory, a full walk takes 2 * (PT_LEVELS + 1)
// cycles from start to done.
// Lint reports the reserved bits of both PTE words as unused: the walker
// ignores them on purpose.
module cami_ptw
  import cami_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  vpn_t        vpn,
  input  pfn_t        ptbr_pfn,
  output logic        busy,
  output logic        done,
  output logic        res_valid,
  output xlate_t      res_xlate,
  // page-table read port
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output pa_t         mem_req_addr,
  input  logic        mem_rsp_valid,
  input  logic [63:0] mem_rsp_data
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_META_REQ, S_META_WAIT, S_DONE} state_e;

  localparam int unsigned LVL_W = $clog2(PT_LEVELS);

  state_e             state_q;
  logic [LVL_W-1:0]   level_q;      // 0 = root
  pfn_t               table_q;      // PFN of the table being read
  vpn_t               vpn_q;
  pfn_t               leaf_pfn_q;   // word 0 of the leaf entry
  logic               leaf_w_q;
  logic               res_valid_q;
  xlate_t             res_q;

  logic [PT_IDX_W-1:0] idx;
  logic                is_leaf;
  pte_w0_t             rsp_w0;
  pte_w1_t             rsp_w1;

  always_comb begin
    idx     = vpn_q[(PT_LEVELS - 1 - 32'(level_q)) * PT_IDX_W +: PT_IDX_W];
    is_leaf = (level_q == LVL_W'(PT_LEVELS - 1));
    rsp_w0  = pte_w0_t'(mem_rsp_data);
    rsp_w1  = pte_w1_t'(mem_rsp_data);
  end

  always_comb begin
    mem_req_valid = (state_q == S_REQ) || (state_q == S_META_REQ);
    mem_req_addr  = {table_q, {PAGE_SHIFT{1'b0}}};
    if (!is_leaf)
      mem_req_addr = mem_req_addr + (pa_t'(idx) << 3);
    else
      mem_req_addr = mem_req_addr + (pa_t'(idx) << 4) + ((state_q == S_META_REQ) ? pa_t'(8) : pa_t'(0));
  end

  assign busy      = (state_q != S_IDLE);
  assign done      = (state_q == S_DONE);
  assign res_valid = res_valid_q;
  assign res_xlate = res_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      level_q     <= '0;
      table_q     <= '0;
      vpn_q       <= '0;
      leaf_pfn_q  <= '0;
      leaf_w_q    <= 1'b0;
      res_valid_q <= 1'b0;
      res_q       <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          vpn_q   <= vpn;
          table_q <= ptbr_pfn;
          level_q <= '0;
          state_q <= S_REQ;
        end
        S_REQ: if (mem_req_ready) state_q <= S_WAIT;
        S_WAIT: if (mem_rsp_valid) begin
          if (!rsp_w0.v) begin
            res_valid_q <= 1'b0;
            res_q       <= '0;
            state_q     <= S_DONE;
          end else if (is_leaf) begin
            leaf_pfn_q <= rsp_w0.pfn;
            leaf_w_q   <= rsp_w0.w;
            state_q <= S_META_REQ;
          end else begin
            table_q <= rsp_w0.pfn;
            level_q <= level_q + 1'b1;
            state_q <= S_REQ;
          end
        end
        S_META_REQ: if (mem_req_ready) state_q <= S_META_WAIT;
        S_META_WAIT: if (mem_rsp_valid) begin
          res_valid_q <= 1'b1;
          res_q.pfn   <= leaf_pfn_q;
          res_q.w     <= leaf_w_q;
          res_q.owner <= rsp_w1.owner;
          res_q.prot  <= rsp_w1.prot;
          state_q     <= S_DONE;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // a request, once raised, stays up with a stable address until accepted
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr);
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
