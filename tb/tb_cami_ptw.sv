// tb_cami_ptw: self-checking test of the page table walker.
//
// Builds page tables with tb_pt_pkg (as a driver would), then walks mapped
// and unmapped pages and compares the result (PFN, writable, owner thread
// ID, protection flag) with what was mapped. Checks that a successful walk
// makes PT_LEVELS + 1 reads (the extra one fetches the ownership word) and,
// with a one-cycle memory, finishes 2 * (PT_LEVELS + 1) + 1 cycles after
// start. A second pass uses a memory with random stalls and longer latency.
module tb_cami_ptw;
  import cami_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        start = 0, busy, done, res_valid;
  vpn_t        vpn;
  pfn_t        ptbr_pfn;
  xlate_t      res_xlate;
  logic        rv_a, rr_a, rsv_a, rv_b, rr_b, rsv_b, mem_req_ready, mem_rsp_valid;
  logic        mem_req_valid;
  pa_t         mem_req_addr;
  logic [63:0] rd_a, rd_b, mem_rsp_data;
  int          reads_a, reads_b;
  logic        use_b = 0;
  int          checks = 0, failures = 0;

  cami_ptw dut (.*);

  tb_pt_mem #(.LATENCY(1), .STALLS(1'b0)) mem_a (.clk, .req_valid(mem_req_valid && !use_b), .req_ready(rr_a),
    .req_addr(mem_req_addr), .rsp_valid(rsv_a), .rsp_data(rd_a), .reads(reads_a));
  tb_pt_mem #(.LATENCY(3), .STALLS(1'b1)) mem_b (.clk, .req_valid(mem_req_valid && use_b), .req_ready(rr_b),
    .req_addr(mem_req_addr), .rsp_valid(rsv_b), .rsp_data(rd_b), .reads(reads_b));

  assign mem_req_ready = use_b ? rr_b : rr_a;
  assign mem_rsp_valid = use_b ? rsv_b : rsv_a;
  assign mem_rsp_data  = use_b ? rd_b : rd_a;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic walk(vpn_t v, logic exp_valid, xlate_t exp, int exp_reads, int exp_cycles);
    int r0, cyc;
    r0 = use_b ? reads_b : reads_a;
    @(negedge clk); start = 1; vpn = v;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (res_valid !== exp_valid || (exp_valid && res_xlate !== exp)) begin
      failures++;
      $display("FAIL vpn=%h valid=%0b/%0b xlate=%h exp=%h", v, res_valid, exp_valid, res_xlate, exp);
    end
    checks++;
    if (((use_b ? reads_b : reads_a) - r0) != exp_reads) begin
      failures++;
      $display("FAIL vpn=%h reads=%0d exp=%0d", v, (use_b ? reads_b : reads_a) - r0, exp_reads);
    end
    if (exp_cycles > 0) begin
      checks++;
      if (cyc != exp_cycles) begin
        failures++;
        $display("FAIL vpn=%h cycles=%0d exp=%0d", v, cyc, exp_cycles);
      end
    end
  endtask

  vpn_t   vpns [8];
  xlate_t xl   [8];

  initial begin
    vpn = '0;
    ptbr_pfn = pfn_t'(32'h100);
    tb_pt_pkg::init(ptbr_pfn);
    for (int i = 0; i < 8; i++) begin
      vpns[i] = (i < 4) ? vpn_t'(36'h7F0_0000 + i) : vpn_t'({$urandom, $urandom});
      xl[i].pfn   = pfn_t'(32'h8_0000 + i * 5);
      xl[i].w     = 1'(i);
      xl[i].owner = tid_t'($urandom);
      xl[i].prot  = 1'(i < 6);
      tb_pt_pkg::map_page(vpns[i], xl[i].pfn, xl[i].w, xl[i].owner, xl[i].prot);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      use_b = 1'(pass);
      for (int i = 0; i < 8; i++)
        walk(vpns[i], 1, xl[i], PT_LEVELS + 1, pass == 0 ? 2 * (PT_LEVELS + 1) + 1 : 0);
      // same upper levels, missing leaf: all levels read, no metadata read
      walk(vpn_t'(36'h7F0_0010), 0, '0, PT_LEVELS, pass == 0 ? 2 * PT_LEVELS + 1 : 0);
      // empty root entry: one read
      walk(vpn_t'(36'hF_FFFF_FFFF), 0, '0, 1, pass == 0 ? 3 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
