// tb_cami_ctu: self-checking test of the Context Tracking Unit.
//
// Issues warp instructions of each opcode with random lane masks and checks
// that one request per active lane leaves, lowest lane first, each tagged
// with {SM_ID, warp, lane}, with the store flag, the store word and the
// address (generic operand for LDG/STG, LOCAL_BASE + TID * 4 KiB + offset
// for LDL/STL, computed here independently). Random backpressure on
// req_ready. Also checks that an instruction of a halted warp is squashed
// and that halting a warp mid-instruction drops its remaining lanes, and
// that an uncontested instruction issues one lane per cycle.
module tb_cami_ctu;
  import cami_pkg::*;

  localparam logic [SM_ID_W-1:0] SMID = 7'd79;

  logic                 clk = 0, rst_n = 0;
  logic                 instr_valid = 0, instr_ready;
  logic [WARP_W-1:0]    instr_warp = 0;
  mem_op_e              instr_op = OP_LDG;
  logic [NUM_LANES-1:0] instr_mask = 0;
  va_t                  instr_addr  [NUM_LANES];
  data_t                instr_wdata [NUM_LANES];
  logic [NUM_WARPS-1:0] halted = 0;
  logic                 squash, req_valid, req_ready = 1;
  lane_req_t            req;
  int                   checks = 0, failures = 0;
  int                   squashes = 0;
  bit                   bp = 0;
  bit                   free_run = 0;
  int                   free_reqs = 0;

  cami_ctu #(.SM_ID(SMID)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) req_ready <= bp ? ($urandom_range(1) == 1) : 1'b1;
  always @(posedge clk) if (squash) squashes++;

  // expected request stream
  lane_req_t exp_q [$];

  always @(posedge clk) begin
    if (rst_n && req_valid && req_ready && free_run) free_reqs++;
    else if (rst_n && req_valid && req_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected request tid=%h va=%h", req.tid, req.va);
      end else begin
        lane_req_t e;
        e = exp_q.pop_front();
        if (req !== e) begin
          failures++;
          $display("FAIL req tid=%h wr=%0b va=%h d=%h exp tid=%h wr=%0b va=%h d=%h",
                   req.tid, req.write, req.va, req.wdata, e.tid, e.write, e.va, e.wdata);
        end
      end
    end
  end

  task automatic issue(logic [WARP_W-1:0] w, mem_op_e op, logic [NUM_LANES-1:0] mask, bit expect_out);
    tid_t t;
    lane_req_t e;
    @(negedge clk);
    while (!instr_ready) @(negedge clk);
    instr_valid = 1; instr_warp = w; instr_op = op; instr_mask = mask;
    for (int l = 0; l < NUM_LANES; l++) begin
      instr_addr[l]  = (op == OP_LDL || op == OP_STL) ? va_t'($urandom_range(4095)) : va_t'({$urandom, $urandom});
      instr_wdata[l] = $urandom;
      if (mask[l] && expect_out) begin
        t.sm = SMID; t.warp = w; t.lane = LANE_W'(l);
        e.tid   = t;
        e.write = (op == OP_STG || op == OP_STL);
        e.wdata = instr_wdata[l];
        if (op == OP_LDL || op == OP_STL)
          e.va = 48'h7F00_0000_0000 + {18'(t), 12'(instr_addr[l])};
        else
          e.va = instr_addr[l];
        exp_q.push_back(e);
      end
    end
    @(negedge clk); instr_valid = 0;
  endtask

  task automatic drain();
    int n = 0;
    while ((exp_q.size() != 0 || !instr_ready) && n < 500) begin @(negedge clk); n++; end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d requests never came", exp_q.size());
      exp_q.delete();
    end
  endtask

  initial begin
    int t0, n;
    for (int l = 0; l < NUM_LANES; l++) begin instr_addr[l] = '0; instr_wdata[l] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    // full warp, no backpressure: 32 lanes in 32 consecutive cycles
    issue(6'd9, OP_STL, '1, 1);
    t0 = 0; n = 0;
    while (exp_q.size() != 0 && t0 < 100) begin @(posedge clk); #1; t0++; end
    checks++;
    if (t0 != 32) begin failures++; $display("FAIL full warp took %0d cycles, exp 32", t0); end
    drain();
    // random instructions with backpressure
    bp = 1;
    for (int i = 0; i < 200; i++) begin
      issue(WARP_W'($urandom), mem_op_e'($urandom_range(3)), $urandom, 1);
      drain();
    end
    bp = 0;
    // halted warp: instruction squashed, nothing issued
    n = squashes;
    halted[12] = 1;
    issue(6'd12, OP_LDL, 32'hFFFF_0000, 0);
    drain();
    checks++;
    if (squashes != n + 1) begin failures++; $display("FAIL halted warp not squashed"); end
    // other warps still run
    issue(6'd13, OP_LDG, 32'h0000_0011, 1);
    drain();
    halted[12] = 0;
    // halt during issue: lanes 0..2 leave, the rest are dropped
    free_run = 1;
    issue(6'd20, OP_STG, '1, 0);
    repeat (3) @(negedge clk);
    halted[20] = 1;
    @(negedge clk); halted[20] = 0;
    repeat (5) @(negedge clk);
    free_run = 0;
    checks++;
    if (free_reqs != 3) begin failures++; $display("FAIL %0d lanes left before the halt took effect, exp 3", free_reqs); end
    checks++;
    if (!instr_ready) begin failures++; $display("FAIL CTU still busy after warp halt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
