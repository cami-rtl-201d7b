// tb_pt_pkg: page-table memory for the testbenches.
//
// Plays the role of the GPU driver: map_page() builds the 4-level table in a
// sparse 64-bit-word memory, allocating intermediate tables on demand, and
// writes the extended leaf entry (word 0 mapping, word 1 Owner_Thread_ID and
// Protection_Flag). rd64() is what the memory model returns to the walker.
// Tables are allocated two pages apart because a leaf table of 512 16-byte
// entries spans 8 KiB.
package tb_pt_pkg;
  import cami_pkg::*;

  logic [63:0] mem [pa_t];
  pfn_t        root_pfn;
  pfn_t        next_pfn;

  function automatic void init(pfn_t root);
    mem.delete();
    root_pfn = root;
    next_pfn = root + 2;
  endfunction

  function automatic logic [63:0] rd64(pa_t a);
    return mem.exists(a) ? mem[a] : 64'd0;
  endfunction

  function automatic pa_t table_entry(pfn_t t, vpn_t vpn, int unsigned level);
    logic [PT_IDX_W-1:0] idx = vpn[(PT_LEVELS - 1 - level) * PT_IDX_W +: PT_IDX_W];
    if (level == PT_LEVELS - 1) return {t, 12'h000} + (pa_t'(idx) * 16);
    else                        return {t, 12'h000} + (pa_t'(idx) * 8);
  endfunction

  function automatic void map_page(vpn_t vpn, pfn_t pfn, logic w, tid_t owner, logic prot);
    pfn_t    t = root_pfn;
    pa_t     a;
    pte_w0_t e;
    pte_w1_t m;
    for (int unsigned l = 0; l < PT_LEVELS - 1; l++) begin
      a = table_entry(t, vpn, l);
      e = pte_w0_t'(rd64(a));
      if (!e.v) begin
        e = '0; e.v = 1'b1; e.pfn = next_pfn; next_pfn += 2;
        mem[a] = 64'(e);
      end
      t = e.pfn;
    end
    a = table_entry(t, vpn, PT_LEVELS - 1);
    e = '0; e.v = 1'b1; e.w = w; e.pfn = pfn;
    m = '0; m.owner = owner; m.prot = prot;
    mem[a]     = 64'(e);
    mem[a + 8] = 64'(m);
  endfunction

  // remove a mapping (page released): clear the leaf's valid bit
  function automatic void unmap_page(vpn_t vpn);
    pfn_t    t = root_pfn;
    pte_w0_t e;
    for (int unsigned l = 0; l < PT_LEVELS - 1; l++) begin
      e = pte_w0_t'(rd64(table_entry(t, vpn, l)));
      if (!e.v) return;
      t = e.pfn;
    end
    mem[table_entry(t, vpn, PT_LEVELS - 1)] = 64'd0;
  endfunction
endpackage
