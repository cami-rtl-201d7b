// cami_fault_regs: CAMI violation registers and per-warp halt state.
//
// When the MMU reports a refused access (fault_valid with fault_info), this
// block halts the offending warp, marking it as stopped by a memory access
// violation, and records the violation metadata (requester thread ID,
// faulting virtual address, read/write, cause) in dedicated registers that
// system software reads. Halting the warp and recording the requester ID and
// address follow the document; the register map, the "first fault wins"
// policy and the software interface are this design's choices.
//
// One record is held. It is captured by the first fault after it was
// cleared; later faults while it is still valid only count (FAULT_COUNT) and
// set the OVERFLOW bit. Every fault halts its warp regardless.
//
// Software port: one 32-bit register access per cycle. sw_rdata is
// combinational from sw_addr. Writes take effect at the clock edge.
//   addr 0 STATUS   r : [0] valid, [1] overflow, [31:16] fault count
//                   w : bit 0 = 1 clears valid, overflow and the count
//   addr 1 TID      r : requester thread ID {sm, warp, lane}
//   addr 2 VA_LO    r : faulting VA [31:0]
//   addr 3 VA_HI    r : faulting VA [47:32]
//   addr 4 INFO     r : [0] write, [2:1] cause (1 unmapped, 2 write, 3 owner)
//   addr 5 HALT_LO  r : halted warps 31..0;  w : write 1 to resume a warp
//   addr 6 HALT_HI  r : halted warps 63..32; w : write 1 to resume a warp
// A fault and a resume of the same warp in one cycle leave it halted.
module cami_fault_regs
  import cami_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 fault_valid,
  input  fault_info_t          fault_info,
  output logic [NUM_WARPS-1:0] halted,
  // software register port
  input  logic [2:0]           sw_addr,
  input  logic                 sw_we,
  input  logic [31:0]          sw_wdata,
  output logic [31:0]          sw_rdata
);

  logic                 rec_valid_q, overflow_q;
  logic [15:0]          count_q;
  fault_info_t          rec_q;
  logic [NUM_WARPS-1:0] halted_q;

  assign halted = halted_q;

  logic clear;
  assign clear = sw_we && sw_addr == 3'd0 && sw_wdata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_valid_q <= 1'b0;
      overflow_q  <= 1'b0;
      count_q     <= '0;
      rec_q       <= '0;
      halted_q    <= '0;
    end else begin
      // record
      if (clear) begin
        rec_valid_q <= 1'b0;
        overflow_q  <= 1'b0;
        count_q     <= '0;
      end
      if (fault_valid) begin
        if (count_q != '1) count_q <= count_q + 1'b1;
        if (!rec_valid_q || clear) begin
          rec_valid_q <= 1'b1;
          rec_q       <= fault_info;
          if (clear) count_q <= 16'd1;
        end else begin
          overflow_q <= 1'b1;
        end
      end
      // halt state: resume first, then the new fault
      if (sw_we && sw_addr == 3'd5) halted_q[31:0]  <= halted_q[31:0]  & ~sw_wdata;
      if (sw_we && sw_addr == 3'd6) halted_q[63:32] <= halted_q[63:32] & ~sw_wdata;
      if (fault_valid) halted_q[fault_info.tid.warp] <= 1'b1;
    end
  end

  always_comb begin
    unique case (sw_addr)
      3'd0:    sw_rdata = {count_q, 14'd0, overflow_q, rec_valid_q};
      3'd1:    sw_rdata = 32'(rec_q.tid);
      3'd2:    sw_rdata = rec_q.va[31:0];
      3'd3:    sw_rdata = 32'(rec_q.va[VA_W-1:32]);
      3'd4:    sw_rdata = {29'd0, rec_q.cause, rec_q.write};
      3'd5:    sw_rdata = halted_q[31:0];
      3'd6:    sw_rdata = halted_q[63:32];
      default: sw_rdata = '0;
    endcase
  end

endmodule
