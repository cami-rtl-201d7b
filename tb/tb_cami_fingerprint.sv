// tb_cami_fingerprint: the three attack experiments of the CAMI security
// evaluation, recorded as memory access fingerprints.
//
// A fingerprint is the set of accesses that reach memory, each with the
// issuing lane, the lane that owns the page it touched, its offset within
// that thread's local memory and whether it read or wrote. In an isolated
// system every point lies in the issuer's own region; a point in another
// thread's region is a successful cross-thread attack.
//
// Two threads of warp 0 take part: T0 (lane 0, victim) and T1 (lane 1,
// attacker). In each scenario both make random legitimate reads and writes
// of their own local memory at offsets 0..127 bytes (about 20 for T0 and 6
// for T1), then T1 attacks through generic addresses of T0's local memory:
//   integrity       - one illegal write to T0's variable (offset 116),
//   confidentiality - four illegal reads of T0's secret (offsets 92..124),
//   control flow    - T0 saves a return address at offset 120, T1 tries to
//                     overwrite it, T0 returns (reloads it).
// Each illegal access must be refused (owner-mismatch fault naming T1),
// after which software clears the record and resumes the warp. The test
// checks that every legitimate access reached memory, that no point lands
// in a foreign region, and that the victim's data survives. It prints each
// scenario's fingerprint as point counts per region.
module tb_cami_fingerprint;
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
  pfn_t                 ptbr_pfn = pfn_t'(32'h200);
  logic                 inv_all = 0, inv_valid = 0;
  vpn_t                 inv_vpn = '0;
  logic [2:0]           sw_addr = 0;
  logic                 sw_we = 0;
  logic [31:0]          sw_wdata = 0, sw_rdata;
  int                   pt_reads;
  int                   checks = 0, failures = 0;

  cami_top dut (.*);
  tb_pt_mem #(.LATENCY(2), .STALLS(1'b0)) ptmem (.clk, .req_valid(pt_req_valid), .req_ready(pt_req_ready),
    .req_addr(pt_req_addr), .rsp_valid(pt_rsp_valid), .rsp_data(pt_rsp_data), .reads(pt_reads));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam pfn_t LPFN = pfn_t'(32'h9_0000);    // + lane

  function automatic tid_t tid_of(int l);
    tid_t t;
    t.sm = '0; t.warp = '0; t.lane = LANE_W'(l);
    return t;
  endfunction

  function automatic va_t lva(int l, int ofs);
    return LOCAL_BASE + {18'(tid_of(l)), 12'(ofs)};
  endfunction

  // ------------------------------------------------------------ fingerprint
  // points[issuer][owner][write]
  int    points [2][2][2];
  data_t dmem [pa_t];
  int    n_fault = 0;

  always @(posedge clk) if (rst_n) begin
    if (fault_irq) n_fault++;
    if (mem_valid && mem_ready) begin
      int owner, issuer;
      owner  = int'(mem_req.pa[PA_W-1:PAGE_SHIFT] - LPFN);
      issuer = int'(mem_req.tid.lane);
      if (owner >= 0 && owner < 2 && issuer < 2) points[issuer][owner][mem_req.write]++;
      if (mem_req.write) dmem[mem_req.pa] = mem_req.wdata;
    end
  end

  // ------------------------------------------------------------ helpers
  task automatic one_lane(int lane, mem_op_e op, va_t addr, data_t d);
    @(negedge clk);
    while (!instr_ready) @(negedge clk);
    instr_valid = 1; instr_warp = 0; instr_op = op; instr_mask = 32'd1 << lane;
    for (int l = 0; l < NUM_LANES; l++) begin instr_addr[l] = '0; instr_wdata[l] = '0; end
    instr_addr[lane] = addr; instr_wdata[lane] = d;
    @(negedge clk); instr_valid = 0;
    repeat (25) @(negedge clk);   // long enough for a walk
  endtask

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // refused by the SCU, recorded with T1's ID and the address; then resume
  task automatic expect_blocked(va_t va, logic wr, string what);
    @(negedge clk); sw_addr = 1; #1; expect_eq(sw_rdata, 32'h1, {what, ": requester T1"});
    @(negedge clk); sw_addr = 2; #1; expect_eq(sw_rdata, va[31:0], {what, ": address"});
    @(negedge clk); sw_addr = 4; #1; expect_eq(sw_rdata, {29'd0, CAUSE_OWNER, wr}, {what, ": cause"});
    expect_eq(halted[0], 1, {what, ": warp halted"});
    @(negedge clk); sw_we = 1; sw_addr = 0; sw_wdata = 1;
    @(negedge clk); sw_addr = 5; sw_wdata = 1;
    @(negedge clk); sw_we = 0;
  endtask

  // legitimate traffic of T0 and T1 in their own regions, interleaved
  int legit [2][2];
  task automatic legit_traffic(int n0, int n1);
    int l, ofs;
    logic wr;
    while (n0 + n1 > 0) begin
      l = (n1 == 0) ? 0 : (n0 == 0) ? 1 : ($urandom_range(3) == 0);
      if (l == 0) n0--; else n1--;
      ofs = $urandom_range(31) * 4;
      wr  = 1'($urandom);
      if (ofs == 100 || ofs == 116 || ofs == 120) wr = 1'b0;   // keep the victim's variables
      one_lane(l, wr ? OP_STL : OP_LDL, va_t'(ofs), 32'hD000_0000 | (l << 12) | ofs);
      legit[l][wr]++;
    end
  endtask

  task automatic start_scenario();
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) for (int k = 0; k < 2; k++) points[i][j][k] = 0;
    for (int i = 0; i < 2; i++) for (int k = 0; k < 2; k++) legit[i][k] = 0;
    n_fault = 0;
  endtask

  task automatic finish_scenario(string name, int attempts);
    $display("%s fingerprint: T0 region: T0 %0dR/%0dW, T1 %0dR/%0dW | T1 region: T1 %0dR/%0dW, T0 %0dR/%0dW | blocked %0d",
             name, points[0][0][0], points[0][0][1], points[1][0][0], points[1][0][1],
             points[1][1][0], points[1][1][1], points[0][1][0], points[0][1][1], n_fault);
    for (int l = 0; l < 2; l++)
      for (int w = 0; w < 2; w++)
        expect_eq(points[l][l][w], legit[l][w], {name, ": legitimate points"});
    expect_eq(points[1][0][0] + points[1][0][1] + points[0][1][0] + points[0][1][1], 0, {name, ": cross-thread points"});
    expect_eq(n_fault, attempts, {name, ": illegal accesses blocked"});
  endtask

  // ------------------------------------------------------------ scenarios
  initial begin
    for (int l = 0; l < NUM_LANES; l++) begin instr_addr[l] = '0; instr_wdata[l] = '0; end
    tb_pt_pkg::init(ptbr_pfn);
    for (int l = 0; l < NUM_LANES; l++)
      tb_pt_pkg::map_page(lva(l, 0) >> 12, LPFN + pfn_t'(l), 1'b1,
                          tid_of(l), 1'b1);
    repeat (3) @(negedge clk); rst_n = 1;

    // integrity
    start_scenario();
    legit_traffic(10, 3);
    one_lane(0, OP_STL, 116, 32'h0000_C0DE); legit[0][1]++;
    legit_traffic(10, 3);
    one_lane(1, OP_STG, lva(0, 116), 32'h0BAD_0BAD);
    expect_blocked(lva(0, 116), 1'b1, "integrity");
    expect_eq(dmem[{LPFN, 12'd116}], 32'h0000_C0DE, "integrity: victim variable");
    finish_scenario("integrity      ", 1);

    // confidentiality
    start_scenario();
    one_lane(0, OP_STL, 100, 32'h5EC2_E700); legit[0][1]++;
    legit_traffic(20, 6);
    for (int i = 0; i < 4; i++) begin
      one_lane(1, OP_LDG, lva(0, 92 + i * 8 + (i == 3 ? 8 : 0)), '0);
      expect_blocked(lva(0, 92 + i * 8 + (i == 3 ? 8 : 0)), 1'b0, "confidentiality");
    end
    finish_scenario("confidentiality", 4);

    // control-flow hijacking
    start_scenario();
    legit_traffic(8, 3);
    one_lane(0, OP_STL, 120, 32'h0000_1C40); legit[0][1]++;     // call: save return address
    legit_traffic(8, 3);
    one_lane(1, OP_STG, lva(0, 120), 32'h0000_7A7A);
    expect_blocked(lva(0, 120), 1'b1, "control-flow");
    one_lane(0, OP_LDL, 120, '0); legit[0][0]++;                 // return: reload it
    expect_eq(dmem[{LPFN, 12'd120}], 32'h0000_1C40, "control-flow: return address");
    finish_scenario("control-flow   ", 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
