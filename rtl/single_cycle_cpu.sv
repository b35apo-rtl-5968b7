// single_cycle_cpu: the single-cycle processor from which the pipeline is
// developed. It is kept as the reference point of the throughput comparison.
// Each instruction is done in one clock period: the PC addresses
// instruction memory, the register file is read, the ALU computes, data
// memory is read or written, and the result is written back at the next
// rising edge together with the new PC. Branches: beq has the ALU subtract
// its operands; on a zero result the next PC is PC + B-immediate (PCBranch),
// otherwise PC + 4 (PCPlus4).
// The block structure follows the classic single-cycle datapath: PC
// register, instruction memory, register file, ALU, data memory, immediate
// decoder, two adders and the result, SrcB and PC multiplexers. The
// memories are outside the module, on the same port list as the pipelined
// core. The decoder, ALU and immediate builder are the modules the pipeline
// uses. Reset behaviour and the `retire` output are this design's own.
// Timing: N instructions take N cycles; the longest path runs from the PC
// through both memories to the register file input.
module single_cycle_cpu
  import pipe_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        dmem_we,
  input  logic [31:0] dmem_rdata,
  output logic        retire
);

  logic [31:0] pc, pc_plus4, pc_branch, pc_next;
  logic [31:0] instr, rd1, rd2, imm, src_b, alu_out, result;
  logic        zero, legal;
  ctrl_t       ctrl;

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

  assign imem_addr = pc;
  assign instr     = imem_rdata;

  control_unit u_ctrl (.instr, .ctrl, .legal);

  regfile #(.WRITE_THROUGH(1'b0)) u_rf (
    .clk, .rst,
    .a1(instr[19:15]), .a2(instr[24:20]), .rd1, .rd2,
    .we3(ctrl.reg_write), .a3(instr[11:7]), .wd3(result)
  );

  imm_decode u_imm (.instr, .sel(ctrl.imm_sel), .imm);

  assign src_b = ctrl.alu_src ? imm : rd2;

  alu #(.WIDTH(32)) u_alu (.a(rd1), .b(src_b), .op(ctrl.alu_op), .y(alu_out), .zero);

  assign dmem_addr  = alu_out;
  assign dmem_wdata = rd2;
  assign dmem_we    = ctrl.mem_write;

  assign result = ctrl.mem_to_reg ? dmem_rdata : alu_out;

  assign pc_plus4  = pc + 32'd4;
  assign pc_branch = pc + imm;
  assign pc_next   = (ctrl.branch && zero) ? pc_branch : pc_plus4;

  assign retire = legal;

endmodule
