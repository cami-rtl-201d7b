// cami_tlb: translation lookaside buffer that also caches CAMI ownership.
//
// Each entry maps a virtual page number to a translation that carries the
// extended-PTE fields: PFN, writable bit, Owner_Thread_ID and
// Protection_Flag. Because ownership lives in the same entry as the mapping,
// a TLB hit hands the SCU the owner ID with no extra lookup.
//
// Organisation (this design's choice; the document does not size the TLB):
// ENTRIES entries, fully associative, round-robin replacement. A fill whose
// VPN is already cached overwrites that entry instead of taking a new one.
//
// Interface and timing:
//   * lookup: lk_vpn in, lk_hit / lk_xlate out, combinational over the
//     registered entries.
//   * fill: fill_valid with fill_vpn / fill_xlate, written at the clock edge.
//   * shootdown: inv_all clears every entry; inv_valid with inv_vpn clears
//     the matching entry. Invalidation wins over a fill in the same cycle.
//   * Reset clears all valid bits.
module cami_tlb
  import cami_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
)(
  input  logic   clk,
  input  logic   rst_n,
  // lookup
  input  vpn_t   lk_vpn,
  output logic   lk_hit,
  output xlate_t lk_xlate,
  // fill
  input  logic   fill_valid,
  input  vpn_t   fill_vpn,
  input  xlate_t fill_xlate,
  // shootdown
  input  logic   inv_all,
  input  logic   inv_valid,
  input  vpn_t   inv_vpn
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic   [ENTRIES-1:0] valid_q;
  vpn_t                 vpn_q   [ENTRIES];
  xlate_t               xlate_q [ENTRIES];
  logic   [IDX_W-1:0]   rr_q;

  // lookup
  always_comb begin
    lk_hit   = 1'b0;
    lk_xlate = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && vpn_q[i] == lk_vpn) begin
        lk_hit   = 1'b1;
        lk_xlate = xlate_q[i];
      end
    end
  end

  // fill target: the entry already holding fill_vpn, else the round-robin one
  logic             fill_match;
  logic [IDX_W-1:0] fill_idx;
  always_comb begin
    fill_match = 1'b0;
    fill_idx   = rr_q;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && vpn_q[i] == fill_vpn) begin
        fill_match = 1'b1;
        fill_idx   = IDX_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      rr_q    <= '0;
    end else if (inv_all) begin
      valid_q <= '0;
    end else begin
      if (fill_valid) begin
        valid_q[fill_idx] <= 1'b1;
        if (!fill_match)
          rr_q <= (rr_q == IDX_W'(ENTRIES - 1)) ? '0 : rr_q + 1'b1;
      end
      if (inv_valid) begin
        for (int unsigned i = 0; i < ENTRIES; i++)
          if (vpn_q[i] == inv_vpn) valid_q[i] <= 1'b0;
      end
    end
  end

  // entry payload needs no reset: it is only read where valid_q is set
  always_ff @(posedge clk) begin
    if (fill_valid) begin
      vpn_q[fill_idx]   <= fill_vpn;
      xlate_q[fill_idx] <= fill_xlate;
    end
  end

endmodule
