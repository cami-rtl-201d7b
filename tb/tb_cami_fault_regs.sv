// tb_cami_fault_regs: self-checking test of the violation registers.
//
// Reports faults and checks, through the software register port, that the
// first violation's requester ID, address, direction and cause are held,
// that later ones only count and set overflow, that every fault halts its
// warp, that clearing re-arms the record, and that software resumes warps.
module tb_cami_fault_regs;
  import cami_pkg::*;

  logic                 clk = 0, rst_n = 0;
  logic                 fault_valid = 0;
  fault_info_t          fault_info;
  logic [NUM_WARPS-1:0] halted;
  logic [2:0]           sw_addr = 0;
  logic                 sw_we = 0;
  logic [31:0]          sw_wdata = 0, sw_rdata;
  int                   checks = 0, failures = 0;

  cami_fault_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic report(tid_t t, va_t va, logic wr, cause_e c);
    @(negedge clk); fault_valid = 1;
    fault_info.tid = t; fault_info.va = va; fault_info.write = wr; fault_info.cause = c;
    @(negedge clk); fault_valid = 0;
  endtask

  task automatic expect_reg(logic [2:0] a, logic [31:0] exp, string what);
    @(negedge clk); sw_addr = a; #1;
    checks++;
    if (sw_rdata !== exp) begin
      failures++;
      $display("FAIL %s reg%0d=%h exp=%h", what, a, sw_rdata, exp);
    end
  endtask

  task automatic write_reg(logic [2:0] a, logic [31:0] d);
    @(negedge clk); sw_we = 1; sw_addr = a; sw_wdata = d;
    @(negedge clk); sw_we = 0;
  endtask

  tid_t t1, t2;

  initial begin
    fault_info = '0;
    t1 = '{sm: 7'd0, warp: 6'd3, lane: 5'd1};
    t2 = '{sm: 7'd0, warp: 6'd40, lane: 5'd7};
    repeat (2) @(negedge clk); rst_n = 1;
    expect_reg(0, 32'h0, "status after reset");
    expect_reg(5, 32'h0, "halt lo after reset");
    report(t1, 48'h7F00_0000_3074, 1'b1, CAUSE_OWNER);
    expect_reg(0, {16'd1, 14'd0, 1'b0, 1'b1}, "status one fault");
    expect_reg(1, 32'(t1), "tid");
    expect_reg(2, 32'h0000_3074, "va lo");
    expect_reg(3, 32'h0000_7F00, "va hi");
    expect_reg(4, {29'd0, CAUSE_OWNER, 1'b1}, "info");
    expect_reg(5, 32'h0000_0008, "warp 3 halted");
    report(t2, 48'h1234_5678_9ABC, 1'b0, CAUSE_UNMAPPED);
    expect_reg(0, {16'd2, 14'd0, 1'b1, 1'b1}, "status overflow");
    expect_reg(1, 32'(t1), "first record kept");
    expect_reg(6, 32'h0000_0100, "warp 40 halted");
    // resume warp 3 only
    write_reg(5, 32'h0000_0008);
    expect_reg(5, 32'h0, "warp 3 resumed");
    expect_reg(6, 32'h0000_0100, "warp 40 still halted");
    // clear and capture again
    write_reg(0, 32'h1);
    expect_reg(0, 32'h0, "cleared");
    report(t2, 48'h1234_5678_9ABC, 1'b0, CAUSE_UNMAPPED);
    expect_reg(0, {16'd1, 14'd0, 1'b0, 1'b1}, "re-armed");
    expect_reg(1, 32'(t2), "new tid");
    expect_reg(2, 32'h5678_9ABC, "new va lo");
    expect_reg(4, {29'd0, CAUSE_UNMAPPED, 1'b0}, "new info");
    // the halted bus reflects the registers
    checks++;
    if (halted !== 64'h0000_0100_0000_0000) begin
      failures++;
      $display("FAIL halted=%h", halted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
