// prefetch_cpu: processor that fetches the next instruction while it
// executes the current one. This is the intermediate step between the
// single-cycle processor and the five-stage pipeline.
// An instruction register (IR) splits the single-cycle datapath into two
// steps. In the first cycle the PC addresses instruction memory and PC + 4
// is formed; the word and its PC are captured in the IR. In the next cycle
// the instruction in the IR is executed exactly as in the single-cycle
// processor (register read, ALU, data memory, write-back), while the
// following instruction is fetched. The clock period only has to cover the
// longer of the two steps (the execute step).
// Branches: a taken beq is known only when it executes, by which time the
// next sequential instruction has already been fetched. This design
// discards that instruction (the IR is loaded with a bubble) and fetches
// from the target. Taking the target from the PC held with the IR, and
// the discard, are this design's own choices.
// Timing: N instructions take N + 1 cycles plus one per taken beq. Ports are
// those of the pipelined core.
module prefetch_cpu
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

  // ---------------------------------------------------------------- fetch
  logic [31:0] pc, pc_next;
  if_id_t      ir_d, ir_q;
  logic        taken;
  logic [31:0] pc_branch;

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

  assign imem_addr = pc;
  assign pc_next   = taken ? pc_branch : pc + 32'd4;
  assign ir_d      = '{valid: 1'b1, instr: imem_rdata, pc: pc};

  localparam if_id_t IR_BUBBLE = '{valid: 1'b0, instr: INSTR_NOP, pc: 32'd0};

  pipe_reg #(.T(if_id_t), .CLR_VALUE(IR_BUBBLE))
    u_ir (.clk, .rst, .en(1'b1), .clr(taken), .d(ir_d), .q(ir_q));

  // ---------------------------------------------------------------- execute
  logic [31:0] rd1, rd2, imm, src_b, alu_out, result;
  logic        zero, legal;
  ctrl_t       ctrl;

  control_unit u_ctrl (.instr(ir_q.instr), .ctrl, .legal);

  regfile #(.WRITE_THROUGH(1'b0)) u_rf (
    .clk, .rst,
    .a1(ir_q.instr[19:15]), .a2(ir_q.instr[24:20]), .rd1, .rd2,
    .we3(ctrl.reg_write), .a3(ir_q.instr[11:7]), .wd3(result)
  );

  imm_decode u_imm (.instr(ir_q.instr), .sel(ctrl.imm_sel), .imm);

  assign src_b = ctrl.alu_src ? imm : rd2;

  alu #(.WIDTH(32)) u_alu (.a(rd1), .b(src_b), .op(ctrl.alu_op), .y(alu_out), .zero);

  assign dmem_addr  = alu_out;
  assign dmem_wdata = rd2;
  assign dmem_we    = ctrl.mem_write;

  assign result    = ctrl.mem_to_reg ? dmem_rdata : alu_out;
  assign pc_branch = ir_q.pc + imm;
  assign taken     = ctrl.branch && zero;

  assign retire = ir_q.valid && legal;

endmodule
