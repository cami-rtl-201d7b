// tb_cami_scu: self-checking test of the Security Check Unit.
//
// Drives directed cases (equal IDs, IDs differing in one bit of each field,
// protection flag set and clear, check disabled) and random ones, and
// compares permit/fault with the rule: protected pages are permitted only to
// their owner, unprotected pages always, nothing when the check is disabled.
module tb_cami_scu;
  import cami_pkg::*;

  logic check_en, prot_flag, permit, fault;
  tid_t requester_tid, owner_tid;
  int   checks = 0, failures = 0;

  cami_scu dut (.*);

  task automatic check_case(logic en, tid_t req, tid_t own, logic prot);
    logic exp_permit, exp_fault;
    check_en = en; requester_tid = req; owner_tid = own; prot_flag = prot;
    #1;
    exp_permit = en && (!prot || (req === own));
    exp_fault  = en && prot && (req !== own);
    checks++;
    if (permit !== exp_permit || fault !== exp_fault) begin
      failures++;
      $display("FAIL en=%0b req=%h own=%h prot=%0b permit=%0b fault=%0b", en, req, own, prot, permit, fault);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tid_t a;
    a = '{sm: 7'd5, warp: 6'd3, lane: 5'd0};
    check_case(1, a, a, 1);                                  // owner accesses own page
    check_case(1, '{sm: 7'd5, warp: 6'd3, lane: 5'd1}, a, 1); // neighbouring lane (attack)
    check_case(1, '{sm: 7'd5, warp: 6'd2, lane: 5'd0}, a, 1); // other warp
    check_case(1, '{sm: 7'd4, warp: 6'd3, lane: 5'd0}, a, 1); // other SM
    check_case(1, '{sm: 7'd5, warp: 6'd3, lane: 5'd1}, a, 0); // unprotected page: bypass
    check_case(0, '{sm: 7'd5, warp: 6'd3, lane: 5'd1}, a, 1); // no check requested
    for (int b = 0; b < TID_W; b++)                           // every comparator bit
      check_case(1, tid_t'(18'h2AAAA ^ (18'd1 << b)), tid_t'(18'h2AAAA), 1);
    for (int i = 0; i < 2000; i++) begin
      a = tid_t'($urandom);
      check_case($urandom_range(3) != 0, ($urandom_range(1) != 0) ? a : tid_t'($urandom), a, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
