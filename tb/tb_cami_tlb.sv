// tb_cami_tlb: self-checking test of the TLB with ownership metadata.
//
// Fills the TLB with translations (PFN, writable, owner, protection flag),
// checks hits return exactly the filled metadata and misses for absent
// pages, that a refill of a cached VPN updates in place, that round-robin
// replacement evicts the oldest entry once all ENTRIES are used, and that
// single-page and full shootdowns remove entries. A reference model of the
// entries is kept in the testbench.
module tb_cami_tlb;
  import cami_pkg::*;

  localparam int unsigned N = 32;   // the default ENTRIES

  logic   clk = 0, rst_n = 0;
  vpn_t   lk_vpn, fill_vpn, inv_vpn;
  logic   lk_hit, fill_valid = 0, inv_all = 0, inv_valid = 0;
  xlate_t lk_xlate, fill_xlate;
  int     checks = 0, failures = 0;

  cami_tlb dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic xlate_t mk(int i);
    xlate_t x;
    x.pfn   = pfn_t'(32'h1000 + i * 7);
    x.w     = 1'(i);
    x.owner = tid_t'(i * 13 + 1);
    x.prot  = 1'(i >> 1);
    return x;
  endfunction

  function automatic vpn_t vp(int i);
    return vpn_t'(36'h7F0_0000 + i * 3);
  endfunction

  task automatic fill(vpn_t v, xlate_t x);
    @(negedge clk); fill_valid = 1; fill_vpn = v; fill_xlate = x;
    @(negedge clk); fill_valid = 0;
  endtask

  task automatic expect_lk(vpn_t v, logic hit, xlate_t x, string what);
    @(negedge clk); lk_vpn = v; #1;
    checks++;
    if (lk_hit !== hit || (hit && lk_xlate !== x)) begin
      failures++;
      $display("FAIL %s vpn=%h hit=%0b exp=%0b xlate=%h exp=%h", what, v, lk_hit, hit, lk_xlate, x);
    end
  endtask

  initial begin
    lk_vpn = '0; fill_vpn = '0; inv_vpn = '0; fill_xlate = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    expect_lk(vp(0), 0, '0, "empty");
    for (int i = 0; i < N; i++) fill(vp(i), mk(i));
    for (int i = 0; i < N; i++) expect_lk(vp(i), 1, mk(i), "filled");
    expect_lk(vp(N), 0, '0, "absent");
    // refill of a cached page updates in place and does not evict
    fill(vp(5), mk(100));
    expect_lk(vp(5), 1, mk(100), "refill");
    expect_lk(vp(0), 1, mk(0), "no evict on refill");
    // a new page evicts the oldest (entry 0), the next one entry 1
    fill(vp(N), mk(N));
    expect_lk(vp(N), 1, mk(N), "new after full");
    expect_lk(vp(0), 0, '0, "oldest evicted");
    expect_lk(vp(1), 1, mk(1), "second kept");
    fill(vp(N + 1), mk(N + 1));
    expect_lk(vp(1), 0, '0, "second evicted");
    expect_lk(vp(2), 1, mk(2), "third kept");
    // single-page shootdown
    @(negedge clk); inv_valid = 1; inv_vpn = vp(7);
    @(negedge clk); inv_valid = 0;
    expect_lk(vp(7), 0, '0, "shootdown one");
    expect_lk(vp(8), 1, mk(8), "neighbour kept");
    // full shootdown
    @(negedge clk); inv_all = 1;
    @(negedge clk); inv_all = 0;
    for (int i = 2; i < N + 2; i++) expect_lk(vp(i), 0, '0, "flushed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
