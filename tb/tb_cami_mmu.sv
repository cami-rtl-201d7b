// tb_cami_mmu: self-checking test of the context-aware MMU.
//
// Maps pages with tb_pt_pkg: private local pages of two threads (protected,
// owned), a shared global page (unprotected), a read-only page, and leaves
// some pages unmapped. Streams lane requests from several threads with
// random gaps and random backpressure on the memory side; an in-order
// reference model predicts each request's outcome: granted with its physical
// address, refused with a cause (unmapped, owner mismatch, write to
// read-only), or dropped because its warp was halted by an earlier fault.
// The testbench plays the fault registers and halts a warp on its fault.
// Also checks: hit latency of 2 cycles, one request per cycle on hits, a
// miss costs a walk of PT_LEVELS + 1 reads, and a TLB shootdown makes a
// released page fault.
module tb_cami_mmu;
  import cami_pkg::*;

  logic                 clk = 0, rst_n = 0;
  logic                 req_valid = 0, req_ready;
  lane_req_t            req;
  pfn_t                 ptbr_pfn = pfn_t'(32'h100);
  logic                 inv_all = 0, inv_valid = 0;
  vpn_t                 inv_vpn = '0;
  logic [NUM_WARPS-1:0] halted = '0;
  logic                 out_valid, out_ready = 1;
  phys_req_t            out;
  logic                 fault_valid, drop, ev_hit, ev_miss;
  fault_info_t          fault_info;
  logic                 pt_req_valid, pt_req_ready, pt_rsp_valid;
  pa_t                  pt_req_addr;
  logic [63:0]          pt_rsp_data;
  int                   pt_reads;
  int                   checks = 0, failures = 0;
  int                   n_hit = 0, n_miss = 0, n_grant = 0, n_fault = 0, n_drop = 0;
  bit                   bp = 0;

  cami_mmu dut (.*);
  tb_pt_mem #(.LATENCY(2), .STALLS(1'b1)) mem (.clk, .req_valid(pt_req_valid), .req_ready(pt_req_ready),
    .req_addr(pt_req_addr), .rsp_valid(pt_rsp_valid), .rsp_data(pt_rsp_data), .reads(pt_reads));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  typedef struct { bit mapped; xlate_t x; } map_t;
  map_t map [vpn_t];
  bit   model_halted [NUM_WARPS];

  typedef enum {GRANT, FAULT, DROP} kind_e;
  typedef struct { kind_e kind; pa_t pa; cause_e cause; lane_req_t r; } exp_t;
  exp_t      exp_q [$];
  lane_req_t drv_q [$];

  function automatic void map_pg(vpn_t v, pfn_t p, logic w, tid_t owner, logic prot);
    map[v].mapped = 1; map[v].x = '{pfn: p, w: w, owner: owner, prot: prot};
    tb_pt_pkg::map_page(v, p, w, owner, prot);
  endfunction

  function automatic exp_t predict(lane_req_t r);
    exp_t e;
    vpn_t v = r.va[VA_W-1:PAGE_SHIFT];
    e.r = r; e.pa = '0; e.cause = CAUSE_NONE;
    if (model_halted[r.tid.warp])                     e.kind = DROP;
    else if (!map.exists(v) || !map[v].mapped)        begin e.kind = FAULT; e.cause = CAUSE_UNMAPPED; end
    else if (map[v].x.prot && map[v].x.owner != r.tid) begin e.kind = FAULT; e.cause = CAUSE_OWNER; end
    else if (r.write && !map[v].x.w)                  begin e.kind = FAULT; e.cause = CAUSE_WRITE; end
    else begin e.kind = GRANT; e.pa = {map[v].x.pfn, r.va[PAGE_SHIFT-1:0]}; end
    if (e.kind == FAULT) model_halted[r.tid.warp] = 1;
    return e;
  endfunction

  task automatic send(tid_t t, logic wr, va_t va);
    lane_req_t r;
    r.tid = t; r.write = wr; r.va = va; r.wdata = $urandom;
    exp_q.push_back(predict(r));
    drv_q.push_back(r);
  endtask

  // ---------------------------------------------------------------- driver
  bit gaps = 0;
  initial req = '0;

  logic taken;
  always @(posedge clk) taken <= req_valid && req_ready;
  always @(negedge clk) begin
    if (taken) begin void'(drv_q.pop_front()); end
    if (drv_q.size() != 0 && (!gaps || $urandom_range(2) != 0 || (req_valid && !taken))) begin
      req_valid <= 1; req <= drv_q[0];
    end else if (taken || !req_valid) begin
      req_valid <= 0;
    end
    out_ready <= bp ? ($urandom_range(2) != 0) : 1'b1;
  end

  // ---------------------------------------------------------------- monitor
  always @(posedge clk) if (rst_n) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (fault_valid) halted[fault_info.tid.warp] <= 1'b1;
    if ((out_valid && out_ready) || fault_valid || drop) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL outcome with nothing expected");
      end else begin
        e = exp_q.pop_front();
        if (out_valid && out_ready) begin
          n_grant++;
          if (e.kind != GRANT || out.pa !== e.pa || out.tid !== e.r.tid || out.write !== e.r.write || out.wdata !== e.r.wdata) begin
            failures++; $display("FAIL grant pa=%h tid=%h, expected kind=%0d pa=%h tid=%h", out.pa, out.tid, e.kind, e.pa, e.r.tid);
          end
        end else if (fault_valid) begin
          n_fault++;
          if (e.kind != FAULT || fault_info.cause != e.cause || fault_info.tid !== e.r.tid || fault_info.va !== e.r.va || fault_info.write !== e.r.write) begin
            failures++; $display("FAIL fault cause=%0d tid=%h va=%h, expected kind=%0d cause=%0d tid=%h va=%h",
                                 fault_info.cause, fault_info.tid, fault_info.va, e.kind, e.cause, e.r.tid, e.r.va);
          end
        end else begin
          n_drop++;
          if (e.kind != DROP) begin failures++; $display("FAIL drop of tid=%h, expected kind=%0d", e.r.tid, e.kind); end
        end
      end
    end
  end

  task automatic wait_idle();
    int n = 0;
    while ((exp_q.size() != 0 || drv_q.size() != 0) && n < 5000) begin @(negedge clk); n++; end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outcomes missing", exp_q.size()); exp_q.delete(); end
  endtask

  function automatic va_t local_va(tid_t t, int ofs);
    return LOCAL_BASE + {18'(t), 12'(ofs)};
  endfunction

  tid_t t0, t1, t2, tw[8];
  va_t  gva, rova;
  int   r0, c;

  initial begin
    t0 = '{sm: 7'd0, warp: 6'd1, lane: 5'd0};
    t1 = '{sm: 7'd0, warp: 6'd1, lane: 5'd1};
    t2 = '{sm: 7'd0, warp: 6'd2, lane: 5'd0};
    gva  = 48'h0000_1234_5000;
    rova = 48'h0000_1234_6000;
    for (int w = 0; w < NUM_WARPS; w++) model_halted[w] = 0;
    tb_pt_pkg::init(ptbr_pfn);
    map_pg(local_va(t0, 0) >> 12, pfn_t'(32'h4_0000), 1, t0, 1);
    map_pg(local_va(t1, 0) >> 12, pfn_t'(32'h4_0001), 1, t1, 1);
    map_pg(local_va(t2, 0) >> 12, pfn_t'(32'h4_0002), 1, t2, 1);
    map_pg(gva >> 12,  pfn_t'(32'h5_0000), 1, '0, 0);
    map_pg(rova >> 12, pfn_t'(32'h5_0001), 0, '0, 0);
    repeat (2) @(negedge clk); rst_n = 1;

    // 1. first access misses and walks: PT_LEVELS + 1 reads
    r0 = pt_reads;
    send(t0, 1, local_va(t0, 16));
    wait_idle();
    checks++;
    if (pt_reads - r0 != PT_LEVELS + 1 || n_miss != 1) begin
      failures++; $display("FAIL walk reads=%0d misses=%0d", pt_reads - r0, n_miss);
    end
    // 2. hit latency: offered in cycle c, granted in cycle c+2
    @(negedge clk);
    req_valid = 0;
    exp_q.push_back(predict('{tid: t0, write: 0, va: local_va(t0, 32), wdata: 32'h0}));
    force req_valid = 1'b1; force req = '{tid: t0, write: 0, va: local_va(t0, 32), wdata: 32'h0};
    @(negedge clk); release req_valid; release req; req_valid = 0;
    c = 1;
    while (!out_valid && c < 20) begin @(negedge clk); c++; end
    checks++;
    if (c != 2) begin failures++; $display("FAIL hit latency %0d cycles, exp 2", c); end
    wait_idle();
    // 3. all pages into the TLB, then back-to-back hits at one per cycle
    send(t1, 0, local_va(t1, 0)); send(t2, 0, local_va(t2, 0));
    send(t0, 0, gva); send(t0, 0, rova);
    wait_idle();
    r0 = n_grant;
    for (int i = 0; i < 16; i++) send(i[0] ? t1 : t0, 0, i[0] ? local_va(t1, i * 4) : gva + i * 4);
    c = 0;
    while (exp_q.size() != 0 && c < 100) begin @(negedge clk); c++; end
    checks++;
    if (n_grant - r0 != 16 || c > 16 + 3) begin failures++; $display("FAIL 16 hits took %0d cycles", c); end
    // 4. random mix with gaps and backpressure: legal, cross-thread, global, read-only, unmapped
    gaps = 1; bp = 1;
    for (int i = 0; i < 400; i++) begin
      tid_t who;
      int k;
      who = (i % 3 == 0) ? t0 : (i % 3 == 1) ? t1 : t2;
      k = $urandom_range(99);
      if (k < 40)      send(who, 1'($urandom), local_va(who, $urandom_range(4095)));
      else if (k < 70) send(who, 1'($urandom), gva + $urandom_range(4095));
      else if (k < 80) send(who, 1'($urandom), rova + $urandom_range(4095));
      else if (k < 92) send(who, 1'($urandom), local_va((who == t0) ? t1 : t0, $urandom_range(4095)));
      else             send(who, 0, 48'h0000_0BAD_0000 + $urandom_range(4095));
      if (i % 8 == 7) begin
        wait_idle();
        halted = '0;
        for (int w = 0; w < NUM_WARPS; w++) model_halted[w] = 0;
      end
    end
    wait_idle();
    gaps = 0; bp = 0;
    halted = '0;
    for (int w = 0; w < NUM_WARPS; w++) model_halted[w] = 0;
    // 5. release a page: the stale TLB entry still translates until shootdown
    tb_pt_pkg::unmap_page(gva >> 12);
    send(t2, 0, gva);
    wait_idle();
    map[gva >> 12].mapped = 0;
    @(negedge clk); inv_valid = 1; inv_vpn = gva >> 12;
    @(negedge clk); inv_valid = 0;
    send(t2, 0, gva);
    wait_idle();
    // 6. full shootdown: next access walks again
    @(negedge clk); inv_all = 1;
    @(negedge clk); inv_all = 0;
    r0 = n_miss;
    send(t1, 0, local_va(t1, 8));
    wait_idle();
    checks++;
    if (n_miss != r0 + 1) begin failures++; $display("FAIL no walk after full shootdown"); end
    checks++;
    if (n_fault == 0 || n_drop == 0 || n_hit == 0 || n_grant == 0) begin
      failures++; $display("FAIL a mechanism never happened: grant=%0d fault=%0d drop=%0d hit=%0d", n_grant, n_fault, n_drop, n_hit);
    end
    $display("grants=%0d faults=%0d drops=%0d hits=%0d misses=%0d", n_grant, n_fault, n_drop, n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
