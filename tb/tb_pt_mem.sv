// tb_pt_mem: behavioural page-table memory for the testbenches.
//
// Serves the walker's read port from tb_pt_pkg's sparse memory. req_ready is
// random (about 3 in 4 cycles) when STALLS is set, always high otherwise; the
// response word comes back LATENCY cycles after the request is accepted.
// It also counts the reads it served.
module tb_pt_mem
  import cami_pkg::*;
#(
  parameter int unsigned LATENCY = 1,
  parameter bit          STALLS  = 1'b0
)(
  input  logic        clk,
  input  logic        req_valid,
  output logic        req_ready,
  input  pa_t         req_addr,
  output logic        rsp_valid,
  output logic [63:0] rsp_data,
  output int          reads
);
  logic [63:0] pend_data;
  int          cnt;

  initial begin
    rsp_valid = 1'b0;
    rsp_data  = '0;
    req_ready = 1'b1;
    reads     = 0;
    cnt       = 0;
  end

  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (cnt > 0) begin
      cnt <= cnt - 1;
      if (cnt == 1) begin
        rsp_valid <= 1'b1;
        rsp_data  <= pend_data;
      end
    end else if (req_valid && req_ready) begin
      pend_data <= tb_pt_pkg::rd64(req_addr);
      reads     <= reads + 1;
      if (LATENCY <= 1) begin
        rsp_valid <= 1'b1;
        rsp_data  <= tb_pt_pkg::rd64(req_addr);
      end else begin
        cnt <= LATENCY - 1;
      end
    end
    req_ready <= STALLS ? ($urandom_range(3) != 0) : 1'b1;
  end
endmodule
