// tb_cami_top: end-to-end test of one SM's CAMI memory path, at the default
// parameters.
//
// Page tables are built as the driver would: every thread of warps 0 and 1
// owns one protected local page; a global page is shared (unprotected), a
// second global page is read-only. The test then plays the three attack
// scenarios of the security evaluation, each after legitimate traffic:
//   integrity       - the attacker lane (T1) stores through a generic address
//                     into the victim's (T0) local variable,
//   confidentiality - T1 loads T0's secret through the generic alias,
//   control flow    - T0 saves a return address on its local stack, T1 tries
//                     to overwrite it, T0 reloads it.
// Each attack must be refused with an owner-mismatch fault that names the
// attacker's thread ID and address in the violation registers, halt the
// warp, and leave the victim's data intact. A data-memory model applies
// every granted store and checks, for every granted access, that a
// protected page is only ever touched by its owner. Also covered: TLB
// hits and walks, unprotected pages bypassing the check, unmapped and
// read-only faults, squash of a halted warp's instruction, drop of
// requests in flight after a fault, software resume, TLB shootdown, memory
// backpressure, and the 3-cycle issue-to-memory latency on a TLB hit.
// Each mechanism is counted, and one that never happened is a failure.
module tb_cami_top;
  import cami_pkg::*;

  logic                 clk = 0, rst_n = 0;
  logic                 instr_valid = 0, instr_ready;
  logic [WARP_W-1:0]    instr_warp = 0;
  mem_op_e              instr_op = OP_LDG;
  logic [NUM_LANES-1:0] instr_mask = 0;
  va_t                  instr_addr  [NUM_LANES];
  data_t                instr_wdata [NUM_LANES];
  logic                 squash, fault_irq, ev_hit, ev_miss, ev_drop;
  logic [NUM_WARPS-1:0] halted;
  logic                 mem_valid, mem_ready = 1;
  phys_req_t            mem_req;
  logic                 pt_req_valid, pt_req_ready, pt_rsp_valid;
  pa_t                  pt_req_addr;
  logic [63:0]          pt_rsp_data;
  pfn_t                 ptbr_pfn = pfn_t'(32'h100);
  logic                 inv_all = 0, inv_valid = 0;
  vpn_t                 inv_vpn = '0;
  logic [2:0]           sw_addr = 0;
  logic                 sw_we = 0;
  logic [31:0]          sw_wdata = 0, sw_rdata;
  int                   pt_reads;
  int                   checks = 0, failures = 0;
  bit                   bp = 0;

  cami_top dut (.*);
  tb_pt_mem #(.LATENCY(3), .STALLS(1'b1)) ptmem (.clk, .req_valid(pt_req_valid), .req_ready(pt_req_ready),
    .req_addr(pt_req_addr), .rsp_valid(pt_rsp_valid), .rsp_data(pt_rsp_data), .reads(pt_reads));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ page setup
  localparam pfn_t LOCAL_PFN0 = pfn_t'(32'h4_0000);   // + warp*32 + lane
  localparam va_t  GVA  = 48'h0000_2000_0000;
  localparam va_t  ROVA = 48'h0000_2000_1000;
  localparam pfn_t GPFN = pfn_t'(32'h6_0000);

  function automatic tid_t tid_of(int w, int l);
    return '{sm: 7'd0, warp: WARP_W'(w), lane: LANE_W'(l)};
  endfunction
  function automatic va_t lva(int w, int l, int ofs);
    return LOCAL_BASE + {18'(tid_of(w, l)), 12'(ofs)};
  endfunction
  function automatic pa_t lpa(int w, int l, int ofs);
    return {LOCAL_PFN0 + pfn_t'(w * 32 + l), 12'(ofs)};
  endfunction

  // ------------------------------------------------------------ data memory
  data_t dmem [pa_t];
  int    n_grant = 0, n_hit = 0, n_miss = 0, n_fault_irq = 0, n_squash = 0, n_drop = 0;
  int    n_bypass = 0, n_cross = 0, n_bp = 0;
  pa_t   last_rd_pa;
  tid_t  last_rd_tid;

  always @(negedge clk) mem_ready <= bp ? ($urandom_range(2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (ev_hit)    n_hit++;
    if (ev_miss)   n_miss++;
    if (fault_irq) n_fault_irq++;
    if (squash)    n_squash++;
    if (ev_drop)   n_drop++;
    if (mem_valid && !mem_ready) n_bp++;
    if (mem_valid && mem_ready) begin
      n_grant++;
      // ownership invariant on protected local frames
      if (mem_req.pa[PA_W-1:PAGE_SHIFT] >= LOCAL_PFN0 && mem_req.pa[PA_W-1:PAGE_SHIFT] < LOCAL_PFN0 + 64) begin
        int idx;
        idx = int'(mem_req.pa[PA_W-1:PAGE_SHIFT] - LOCAL_PFN0);
        checks++;
        if (mem_req.tid !== tid_of(idx / 32, idx % 32)) begin
          n_cross++; failures++;
          $display("FAIL thread %h reached the private page of thread %h", mem_req.tid, tid_of(idx / 32, idx % 32));
        end
      end else if (mem_req.pa[PA_W-1:PAGE_SHIFT] == GPFN) n_bypass++;
      if (mem_req.write) dmem[mem_req.pa] = mem_req.wdata;
      else begin last_rd_pa = mem_req.pa; last_rd_tid = mem_req.tid; end
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic issue(int w, mem_op_e op, logic [NUM_LANES-1:0] mask, va_t a [NUM_LANES], data_t d [NUM_LANES]);
    @(negedge clk);
    while (!instr_ready) @(negedge clk);
    instr_valid = 1; instr_warp = WARP_W'(w); instr_op = op; instr_mask = mask;
    instr_addr = a; instr_wdata = d;
    @(negedge clk); instr_valid = 0;
  endtask

  task automatic settle();
    int quiet = 0, n = 0;
    while (quiet < 30 && n < 20000) begin
      @(negedge clk); n++;
      if (!instr_ready || mem_valid || pt_req_valid || ptmem.cnt != 0) quiet = 0; else quiet++;
    end
  endtask

  task automatic rd_reg(logic [2:0] a, output logic [31:0] d);
    @(negedge clk); sw_addr = a; #1; d = sw_rdata;
  endtask
  task automatic wr_reg(logic [2:0] a, logic [31:0] d);
    @(negedge clk); sw_we = 1; sw_addr = a; sw_wdata = d;
    @(negedge clk); sw_we = 0;
  endtask

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // check the violation record names the attacker and address, then clear
  // it and resume the warp
  task automatic expect_violation(tid_t t, va_t va, logic wr, string what);
    logic [31:0] d;
    rd_reg(0, d); expect_eq(d[0], 1, {what, ": record valid"});
    rd_reg(1, d); expect_eq(d, 32'(t), {what, ": requester TID"});
    rd_reg(2, d); expect_eq(d, va[31:0], {what, ": VA low"});
    rd_reg(3, d); expect_eq(d, 32'(va[47:32]), {what, ": VA high"});
    rd_reg(4, d); expect_eq(d, {29'd0, CAUSE_OWNER, wr}, {what, ": cause"});
    expect_eq(halted[t.warp], 1, {what, ": warp halted"});
    wr_reg(0, 32'h1);
    wr_reg(t.warp < 32 ? 3'd5 : 3'd6, 32'd1 << (t.warp % 32));
    expect_eq(halted[t.warp], 0, {what, ": warp resumed"});
  endtask

  va_t   a [NUM_LANES];
  data_t d [NUM_LANES];

  task automatic fill_local(int w, int ofs);
    for (int l = 0; l < NUM_LANES; l++) begin a[l] = va_t'(ofs); d[l] = 32'hA000_0000 | (w << 8) | l; end
  endtask

  // ------------------------------------------------------------ test
  initial begin
    int c, f0, sq0, dr0;
    logic [31:0] r;
    for (int l = 0; l < NUM_LANES; l++) begin instr_addr[l] = '0; instr_wdata[l] = '0; end
    tb_pt_pkg::init(ptbr_pfn);
    for (int w = 0; w < 2; w++)
      for (int l = 0; l < NUM_LANES; l++)
        tb_pt_pkg::map_page(lva(w, l, 0) >> 12, LOCAL_PFN0 + pfn_t'(w * 32 + l), 1'b1, tid_of(w, l), 1'b1);
    tb_pt_pkg::map_page(GVA >> 12, GPFN, 1'b1, '0, 1'b0);
    tb_pt_pkg::map_page(ROVA >> 12, GPFN + 1, 1'b0, '0, 1'b0);
    repeat (3) @(negedge clk); rst_n = 1;

    // legitimate traffic: every lane of both warps writes then reads its own stack
    bp = 1;
    for (int w = 0; w < 2; w++) begin
      fill_local(w, 12'h040); issue(w, OP_STL, '1, a, d);
      fill_local(w, 12'h040); issue(w, OP_LDL, '1, a, d);
    end
    settle();
    for (int w = 0; w < 2; w++)
      for (int l = 0; l < NUM_LANES; l++)
        expect_eq(dmem.exists(lpa(w, l, 12'h040)) ? dmem[lpa(w, l, 12'h040)] : 32'hDEAD, 32'hA000_0000 | (w << 8) | l, "legit local store");
    expect_eq(n_fault_irq, 0, "no faults on legitimate traffic");
    expect_eq(n_grant, 128, "all legitimate lanes granted");
    bp = 0;

    // issue-to-memory latency on a TLB hit: lane offered one cycle after
    // acceptance, granted two cycles later
    fill_local(0, 12'h044);
    issue(0, OP_LDL, 32'h1, a, d);   // brings T0's page back into the TLB
    settle();
    @(negedge clk);
    instr_valid = 1; instr_warp = 0; instr_op = OP_LDL; instr_mask = 32'h1; instr_addr = a; instr_wdata = d;
    @(negedge clk); instr_valid = 0;
    c = 0;
    while (!mem_valid && c < 20) begin @(negedge clk); c++; end
    expect_eq(c, 2, "cycles from acceptance edge to grant");
    settle();

    // ---- integrity attack: T1 overwrites T0's variable through its generic address
    for (int l = 0; l < NUM_LANES; l++) begin a[l] = '0; d[l] = '0; end
    a[1] = lva(0, 0, 12'h040); d[1] = 32'h0BAD_0BAD;
    f0 = n_fault_irq;
    issue(0, OP_STG, 32'h2, a, d);
    settle();
    expect_eq(n_fault_irq, f0 + 1, "integrity attack refused");
    expect_eq(dmem[lpa(0, 0, 12'h040)], 32'hA000_0000, "victim variable intact");
    // the halted warp's next instruction is squashed; warp 1 still runs
    sq0 = n_squash;
    fill_local(0, 12'h048); issue(0, OP_LDL, '1, a, d);
    settle();
    expect_eq(n_squash, sq0 + 1, "halted warp squashed");
    fill_local(1, 12'h048); issue(1, OP_STL, '1, a, d);
    settle();
    expect_eq(dmem[lpa(1, 5, 12'h048)], 32'hA000_0105, "other warp unaffected");
    expect_violation(tid_of(0, 1), lva(0, 0, 12'h040), 1'b1, "integrity");

    // ---- confidentiality attack: T0 stores a secret, T1 tries to read it
    for (int l = 0; l < NUM_LANES; l++) begin a[l] = '0; d[l] = '0; end
    a[0] = 12'h080; d[0] = 32'h5EC2_E7C0;
    issue(0, OP_STL, 32'h1, a, d);
    settle();
    a[1] = lva(0, 0, 12'h080);
    f0 = n_fault_irq;
    last_rd_pa = '0;
    issue(0, OP_LDG, 32'h2, a, d);
    settle();
    expect_eq(n_fault_irq, f0 + 1, "confidentiality attack refused");
    expect_eq(last_rd_pa, '0, "secret never read from memory");
    expect_violation(tid_of(0, 1), lva(0, 0, 12'h080), 1'b0, "confidentiality");

    // ---- control-flow hijack: T0 saves a return address, T1 overwrites, T0 returns
    for (int l = 0; l < NUM_LANES; l++) begin a[l] = '0; d[l] = '0; end
    a[0] = 12'hFF0; d[0] = 32'h0000_1C40;
    issue(0, OP_STL, 32'h1, a, d);
    settle();
    a[0] = '0; a[1] = lva(0, 0, 12'hFF0); d[1] = 32'h0000_7A7A;
    f0 = n_fault_irq;
    issue(0, OP_STG, 32'h2, a, d);
    settle();
    expect_eq(n_fault_irq, f0 + 1, "control-flow attack refused");
    expect_violation(tid_of(0, 1), lva(0, 0, 12'hFF0), 1'b1, "control-flow");
    a[0] = 12'hFF0;
    issue(0, OP_LDL, 32'h1, a, d);
    settle();
    expect_eq(last_rd_pa, lpa(0, 0, 12'hFF0), "victim reloads its return address");
    expect_eq(last_rd_tid, tid_of(0, 0), "reload by the victim");
    expect_eq(dmem[lpa(0, 0, 12'hFF0)], 32'h0000_1C40, "return address intact");

    // ---- unprotected (global) page: any thread may write and read it
    for (int l = 0; l < NUM_LANES; l++) begin a[l] = GVA + l * 4; d[l] = 32'hC0DE_0000 + l; end
    f0 = n_fault_irq;
    issue(1, OP_STG, '1, a, d);
    issue(0, OP_LDG, '1, a, d);
    settle();
    expect_eq(n_fault_irq, f0, "global page needs no ownership");
    expect_eq(dmem[{GPFN, 12'h07C}], 32'hC0DE_001F, "global store");

    // ---- attack in the middle of a warp instruction: lane 1 faults, the
    //      lanes behind it are dropped or never issued
    for (int l = 0; l < NUM_LANES; l++) begin a[l] = GVA + 12'h100 + l * 4; d[l] = 32'h1111_0000 + l; end
    a[1] = lva(0, 0, 12'h040);
    dr0 = n_drop; f0 = n_fault_irq;
    issue(0, OP_STG, 32'hF, a, d);
    settle();
    expect_eq(n_fault_irq, f0 + 1, "mid-warp attack refused");
    expect_eq(dmem.exists({GPFN, 12'h100}), 1, "lane 0 ahead of the fault completed");
    expect_eq(dmem.exists({GPFN, 12'h10C}), 0, "lane 3 behind the fault not performed");
    expect_eq(n_drop > dr0, 1, "in-flight lane dropped");
    expect_violation(tid_of(0, 1), lva(0, 0, 12'h040), 1'b1, "mid-warp");

    // ---- unmapped address and read-only page
    for (int l = 0; l < NUM_LANES; l++) begin a[l] = '0; d[l] = '0; end
    a[2] = 48'h0000_3000_0000;
    issue(1, OP_LDG, 32'h4, a, d);
    settle();
    rd_reg(4, r); expect_eq(r[2:1], CAUSE_UNMAPPED, "unmapped cause");
    wr_reg(0, 1); wr_reg(5, 32'h2);
    a[2] = ROVA;
    issue(1, OP_STG, 32'h4, a, d);
    settle();
    rd_reg(4, r); expect_eq(r[2:1], CAUSE_WRITE, "read-only cause");
    wr_reg(0, 1); wr_reg(5, 32'h2);

    // ---- page release: shootdown, then the page faults
    tb_pt_pkg::unmap_page(lva(1, 7, 0) >> 12);
    @(negedge clk); inv_valid = 1; inv_vpn = lva(1, 7, 0) >> 12;
    @(negedge clk); inv_valid = 0;
    for (int l = 0; l < NUM_LANES; l++) begin a[l] = 12'h040; d[l] = '0; end
    f0 = n_fault_irq;
    issue(1, OP_LDL, 32'h80, a, d);
    settle();
    expect_eq(n_fault_irq, f0 + 1, "released page faults after shootdown");
    rd_reg(4, r); expect_eq(r[2:1], CAUSE_UNMAPPED, "released page cause");
    wr_reg(0, 1); wr_reg(5, 32'h2);

    // ---- mechanisms
    $display("grants=%0d hits=%0d walks=%0d faults=%0d squashes=%0d drops=%0d bypass=%0d backpressure=%0d pt_reads=%0d",
             n_grant, n_hit, n_miss, n_fault_irq, n_squash, n_drop, n_bypass, n_bp, pt_reads);
    expect_eq(n_hit > 0, 1, "TLB hit happened");
    expect_eq(n_miss > 0, 1, "page walk happened");
    expect_eq(pt_reads >= n_miss * 2, 1, "walks read memory");
    expect_eq(n_fault_irq >= 7, 1, "faults happened");
    expect_eq(n_squash > 0, 1, "squash happened");
    expect_eq(n_drop > 0, 1, "drop happened");
    expect_eq(n_bypass > 0, 1, "unprotected bypass happened");
    expect_eq(n_bp > 0, 1, "memory backpressure happened");
    expect_eq(n_cross, 0, "no cross-thread access reached memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
