// regfile: 32 x 32-bit register file with two read ports and one write port.
// Register x0 always reads as zero and ignores writes. The register file is
// read in ID and written in WB; the lecture design writes in the first half
// of the cycle and reads in the second, so an instruction in ID sees the
// value written by the instruction in WB in the same cycle. This design keeps
// a single rising-edge clock and gets the same effect with a write-through
// bypass: a read of the register being written returns the write data.
// Reads are combinational; the write takes effect at the rising clock edge.
// WRITE_THROUGH = 0 removes the bypass. This is for the single-cycle and
// prefetching processors, where the write data is computed from the read
// data in the same cycle and the bypass would close a combinational loop.
module regfile
  import pipe_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32,
  parameter bit          WRITE_THROUGH = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(DEPTH)-1:0] a1,
  input  logic [$clog2(DEPTH)-1:0] a2,
  output logic [WIDTH-1:0]         rd1,
  output logic [WIDTH-1:0]         rd2,
  input  logic                     we3,
  input  logic [$clog2(DEPTH)-1:0] a3,
  input  logic [WIDTH-1:0]         wd3
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we3 && a3 != '0) begin
      regs[a3] <= wd3;
    end
  end

  if (WRITE_THROUGH) begin : g_bypass
    always_comb begin
      if (a1 == '0)                 rd1 = '0;
      else if (we3 && a1 == a3)     rd1 = wd3;
      else                          rd1 = regs[a1];
      if (a2 == '0)                 rd2 = '0;
      else if (we3 && a2 == a3)     rd2 = wd3;
      else                          rd2 = regs[a2];
    end
  end else begin : g_plain
    assign rd1 = (a1 == '0) ? '0 : regs[a1];
    assign rd2 = (a2 == '0) ? '0 : regs[a2];
  end

endmodule
