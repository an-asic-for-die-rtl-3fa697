// regfile: the input register file of an execution unit.
//
// N registers of W bits with one write port and one asynchronous read port.
// A write is taken at the rising clock edge when `we` is high; the read port
// shows the register selected by `raddr` in the same cycle. Every execution
// unit of the processor has one of these in front of each of its inputs; the
// number of registers of each comes from the design's architecture summary.
// Reset clears all registers (a choice of this design). Addresses at or above
// N read as zero and are ignored on write.
module regfile #(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = 16,
  parameter int unsigned AW = (N <= 2) ? 1 : $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] r [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) r[i] <= '0;
    end else if (we && (32'(waddr) < N)) begin
      r[waddr] <= wdata;
    end
  end

  assign rdata = (32'(raddr) < N) ? r[raddr] : '0;
endmodule
