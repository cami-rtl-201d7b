// cami_scu: Security Check Unit, the decision point of CAMI.
//
// It sits in the MMU after address translation and before the request is
// sent to memory. It takes the requester thread ID that the Context Tracking
// Unit attached to the request and the owner thread ID and Protection_Flag
// that came with the translation (from a TLB hit or a page walk). As the
// CAMI design prescribes, it is a TID_W-bit equality comparator with a
// little control: when the page's Protection_Flag is set the access is
// permitted only if the two IDs are equal; when it is clear (global or
// shared memory) the check is bypassed and the access is permitted.
//
// Interface: check_en qualifies the inputs (a valid translation is being
// checked). permit and fault are one-hot while check_en is high and both low
// otherwise. Purely combinational; the MMU registers its decision.
module cami_scu
  import cami_pkg::*;
(
  input  logic check_en,
  input  tid_t requester_tid,
  input  tid_t owner_tid,
  input  logic prot_flag,
  output logic permit,
  output logic fault
);

  logic ids_match;

  always_comb begin
    ids_match = (requester_tid == owner_tid);
    permit    = check_en && (!prot_flag || ids_match);
    fault     = check_en &&  prot_flag && !ids_match;
  end

endmodule
