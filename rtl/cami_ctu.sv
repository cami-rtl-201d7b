// cami_ctu: Context Tracking Unit, the CAMI front end in the load/store unit.
//
// It accepts one warp memory instruction at a time (warp slot, opcode,
// active-lane mask, one address or local offset and one store word per
// lane) and turns it into one request per active lane. Each request is
// tagged with the global hardware ID of the thread that issued it,
// {SM_ID, warp slot, lane}, captured here at dispatch so that the MMU never
// has to reconstruct it. Keeping one request per lane preserves the lane
// identity that the SCU needs to check thread-private pages.
//
// Address forming (the customised local-memory path of the LSU):
//   LDG/STG: the lane's operand is used as the virtual address.
//   LDL/STL: the lane's operand is an offset into the thread's private local
//            memory, VA = LOCAL_BASE + TID * 4 KiB + offset[11:0].
// Because this formula gives a plain virtual address, a thread can reach the
// same page with LDG/STG; the SCU, not this address path, enforces isolation.
// All requests, local or generic, carry the requester TID.
//
// Halted warps: an instruction from a warp whose halted bit is set is
// dropped when offered (squash pulses, nothing is issued). If the warp is
// halted while its lanes are being issued, the remaining lanes are dropped.
//
// Timing: instr_ready is high only while idle; lanes leave one per cycle,
// lowest lane first, under req_valid/req_ready; the first lane of an
// accepted instruction is offered in the cycle after acceptance.
// Per-lane serialisation, the local window formula and the halt behaviour
// are this design's choices; the document gives the CTU's role only.
module cami_ctu
  import cami_pkg::*;
#(
  parameter logic [SM_ID_W-1:0] SM_ID = '0
)(
  input  logic                  clk,
  input  logic                  rst_n,
  // warp instruction from the issue stage
  input  logic                  instr_valid,
  output logic                  instr_ready,
  input  logic [WARP_W-1:0]     instr_warp,
  input  mem_op_e               instr_op,
  input  logic [NUM_LANES-1:0]  instr_mask,
  input  va_t                   instr_addr  [NUM_LANES],
  input  data_t                 instr_wdata [NUM_LANES],
  // halt state of the warps
  input  logic [NUM_WARPS-1:0]  halted,
  output logic                  squash,
  // per-lane requests to the MMU
  output logic                  req_valid,
  input  logic                  req_ready,
  output lane_req_t             req
);

  logic                 busy_q;
  logic [WARP_W-1:0]    warp_q;
  mem_op_e              op_q;
  logic [NUM_LANES-1:0] pend_q;
  va_t                  addr_q  [NUM_LANES];
  data_t                wdata_q [NUM_LANES];

  // lowest pending lane
  logic [LANE_W-1:0] lane;
  always_comb begin
    lane = '0;
    for (int i = NUM_LANES - 1; i >= 0; i--)
      if (pend_q[i]) lane = LANE_W'(i);
  end

  logic abort;
  assign abort = busy_q && halted[warp_q];

  tid_t tid;
  always_comb begin
    tid.sm   = SM_ID;
    tid.warp = warp_q;
    tid.lane = lane;
  end

  always_comb begin
    req.tid   = tid;
    req.write = (op_q == OP_STG) || (op_q == OP_STL);
    req.wdata = wdata_q[lane];
    if (op_q == OP_LDL || op_q == OP_STL)
      req.va = LOCAL_BASE + (va_t'(tid) << LOCAL_OFS_W) + va_t'(addr_q[lane][LOCAL_OFS_W-1:0]);
    else
      req.va = addr_q[lane];
  end

  assign instr_ready = !busy_q;
  assign req_valid   = busy_q && !abort;
  assign squash      = (instr_valid && instr_ready && halted[instr_warp]) || abort;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      warp_q <= '0;
      op_q   <= OP_LDG;
      pend_q <= '0;
    end else if (!busy_q) begin
      if (instr_valid && !halted[instr_warp] && instr_mask != '0) begin
        busy_q <= 1'b1;
        warp_q <= instr_warp;
        op_q   <= instr_op;
        pend_q <= instr_mask;
      end
    end else if (abort) begin
      busy_q <= 1'b0;
      pend_q <= '0;
    end else if (req_ready) begin
      pend_q[lane] <= 1'b0;
      if ((pend_q & ~(NUM_LANES'(1) << lane)) == '0) busy_q <= 1'b0;
    end
  end

  // operand storage, loaded on acceptance
  always_ff @(posedge clk) begin
    if (!busy_q && instr_valid) begin
      addr_q  <= instr_addr;
      wdata_q <= instr_wdata;
    end
  end

  // a lane request stays offered, unchanged, until taken or the warp halts
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> (req_valid && $stable(req)) || abort);

endmodule
