// riscv_pipeline: five-stage pipelined RV32 processor core (add, sub, and, or,
// slt, addi, lw, sw, beq) with instruction and data memories outside it.
//
// Stages, each one clock cycle, separated by interstage registers:
//   IF  - the PC addresses instruction memory; PC + 4 is formed in parallel.
//   ID  - decode, immediate build, register file read (rs1, rs2); beq is
//         resolved here with an equality comparator and its own target adder.
//   EX  - ALU operation on forwarded register values or the immediate.
//   MEM - data memory read (lw) or write (sw).
//   WB  - result (ALU or memory) written to the register file.
//
// Hazards are handled by hazard_unit: MEM->EX and WB->EX forwarding, a WB->ID
// write-through inside the register file, MEM->ID forwarding into the branch
// comparator, a one-cycle load-use stall, a stall of a beq whose operands are
// not ready, and a one-instruction flush after a taken beq. With no hazards
// one instruction completes per cycle; an instruction's result is written at
// the end of its fifth cycle.
//
// Memory interface: imem_addr/imem_rdata is a combinational read; the data
// port presents dmem_addr/dmem_wdata/dmem_we in MEM and expects dmem_rdata in
// the same cycle, the write happening at the next rising edge. `retire`
// pulses once for every instruction leaving WB (bubbles excluded).
// Synchronous active-high reset; the PC restarts at RESET_PC.
module riscv_pipeline
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

  // ---------------------------------------------------------------- control
  logic     stall_f, stall_d, flush_d, flush_e, pc_src_d;
  logic     lw_stall, branch_stall;
  fwd_sel_e fwd_a_e, fwd_b_e;
  logic     fwd_a_d, fwd_b_d;

  // ---------------------------------------------------------------- IF
  logic [31:0] pc_f, pc_next_f, pc_plus4_f, pc_branch_d;
  if_id_t      if_id_d, if_id_q;

  always_ff @(posedge clk) begin
    if (rst)           pc_f <= RESET_PC;
    else if (!stall_f) pc_f <= pc_next_f;
  end

  assign pc_plus4_f = pc_f + 32'd4;
  assign pc_next_f  = pc_src_d ? pc_branch_d : pc_plus4_f;
  assign imem_addr  = pc_f;

  assign if_id_d = '{valid: 1'b1, instr: imem_rdata, pc: pc_f};

  localparam if_id_t IF_ID_BUBBLE = '{valid: 1'b0, instr: INSTR_NOP, pc: 32'd0};

  pipe_reg #(.T(if_id_t), .CLR_VALUE(IF_ID_BUBBLE))
    u_if_id (.clk, .rst, .en(!stall_d), .clr(flush_d), .d(if_id_d), .q(if_id_q));

  // ---------------------------------------------------------------- ID
  ctrl_t       ctrl_d;
  logic        legal_d;
  logic [4:0]  rs1_d, rs2_d, rd_d;
  logic [31:0] rd1_d, rd2_d, imm_d, cmp_a_d, cmp_b_d;
  logic        eq_d;
  id_ex_t      id_ex_d, id_ex_q;

  logic        reg_write_w;
  logic [4:0]  rd_w;
  logic [31:0] result_w;

  assign rs1_d = if_id_q.instr[19:15];
  assign rs2_d = if_id_q.instr[24:20];
  assign rd_d  = if_id_q.instr[11:7];

  control_unit u_ctrl (.instr(if_id_q.instr), .ctrl(ctrl_d), .legal(legal_d));

  regfile u_rf (
    .clk, .rst,
    .a1(rs1_d), .a2(rs2_d), .rd1(rd1_d), .rd2(rd2_d),
    .we3(reg_write_w), .a3(rd_w), .wd3(result_w)
  );

  imm_decode u_imm (.instr(if_id_q.instr), .sel(ctrl_d.imm_sel), .imm(imm_d));

  ex_mem_t ex_mem_q;

  assign cmp_a_d = fwd_a_d ? ex_mem_q.alu_out : rd1_d;
  assign cmp_b_d = fwd_b_d ? ex_mem_q.alu_out : rd2_d;

  eq_comparator #(.WIDTH(32)) u_cmp (.a(cmp_a_d), .b(cmp_b_d), .eq(eq_d));

  assign pc_branch_d = if_id_q.pc + imm_d;

  assign id_ex_d = '{valid: if_id_q.valid && legal_d, ctrl: ctrl_d, rd1: rd1_d, rd2: rd2_d,
                     imm: imm_d, rs1: rs1_d, rs2: rs2_d, rd: rd_d};

  localparam id_ex_t ID_EX_BUBBLE = '{valid: 1'b0, ctrl: CTRL_NOP, rd1: 32'd0, rd2: 32'd0,
                                      imm: 32'd0, rs1: 5'd0, rs2: 5'd0, rd: 5'd0};

  pipe_reg #(.T(id_ex_t), .CLR_VALUE(ID_EX_BUBBLE))
    u_id_ex (.clk, .rst, .en(1'b1), .clr(flush_e), .d(id_ex_d), .q(id_ex_q));

  // ---------------------------------------------------------------- EX
  logic [31:0] src_a_e, fwd_b_val_e, src_b_e, alu_y_e;
  logic        alu_zero_e;
  ex_mem_t     ex_mem_d;

  always_comb begin
    unique case (fwd_a_e)
      FWD_MEM: src_a_e = ex_mem_q.alu_out;
      FWD_WB:  src_a_e = result_w;
      default: src_a_e = id_ex_q.rd1;
    endcase
    unique case (fwd_b_e)
      FWD_MEM: fwd_b_val_e = ex_mem_q.alu_out;
      FWD_WB:  fwd_b_val_e = result_w;
      default: fwd_b_val_e = id_ex_q.rd2;
    endcase
  end

  assign src_b_e = id_ex_q.ctrl.alu_src ? id_ex_q.imm : fwd_b_val_e;

  alu #(.WIDTH(32)) u_alu (.a(src_a_e), .b(src_b_e), .op(id_ex_q.ctrl.alu_op),
                           .y(alu_y_e), .zero(alu_zero_e));

  assign ex_mem_d = '{valid: id_ex_q.valid, reg_write: id_ex_q.ctrl.reg_write,
                      mem_to_reg: id_ex_q.ctrl.mem_to_reg, mem_write: id_ex_q.ctrl.mem_write,
                      alu_out: alu_y_e, write_data: fwd_b_val_e, rd: id_ex_q.rd};

  pipe_reg #(.T(ex_mem_t)) u_ex_mem (.clk, .rst, .en(1'b1), .clr(1'b0), .d(ex_mem_d), .q(ex_mem_q));

  // ---------------------------------------------------------------- MEM
  mem_wb_t mem_wb_d, mem_wb_q;

  assign dmem_addr  = ex_mem_q.alu_out;
  assign dmem_wdata = ex_mem_q.write_data;
  assign dmem_we    = ex_mem_q.mem_write;

  assign mem_wb_d = '{valid: ex_mem_q.valid, reg_write: ex_mem_q.reg_write,
                      mem_to_reg: ex_mem_q.mem_to_reg, alu_out: ex_mem_q.alu_out,
                      read_data: dmem_rdata, rd: ex_mem_q.rd};

  pipe_reg #(.T(mem_wb_t)) u_mem_wb (.clk, .rst, .en(1'b1), .clr(1'b0), .d(mem_wb_d), .q(mem_wb_q));

  // ---------------------------------------------------------------- WB
  assign result_w    = mem_wb_q.mem_to_reg ? mem_wb_q.read_data : mem_wb_q.alu_out;
  assign reg_write_w = mem_wb_q.reg_write;
  assign rd_w        = mem_wb_q.rd;
  assign retire      = mem_wb_q.valid;

  // ---------------------------------------------------------------- hazards
  hazard_unit u_hazard (
    .rs1_d, .rs2_d, .use_rs1_d(ctrl_d.use_rs1), .use_rs2_d(ctrl_d.use_rs2),
    .branch_d(ctrl_d.branch), .branch_eq_d(eq_d),
    .rs1_e(id_ex_q.rs1), .rs2_e(id_ex_q.rs2), .rd_e(id_ex_q.rd),
    .reg_write_e(id_ex_q.ctrl.reg_write), .mem_to_reg_e(id_ex_q.ctrl.mem_to_reg),
    .rd_m(ex_mem_q.rd), .reg_write_m(ex_mem_q.reg_write), .mem_to_reg_m(ex_mem_q.mem_to_reg),
    .rd_w, .reg_write_w,
    .fwd_a_e, .fwd_b_e, .fwd_a_d, .fwd_b_d,
    .stall_f, .stall_d, .flush_d, .flush_e, .pc_src_d, .lw_stall, .branch_stall
  );

  // A stalled stage must not be flushed by its own branch decision, and
  // a register operand the instruction uses is never forwarded from a load
  // in MEM (the load-use stall prevents it).
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(pc_src_d && stall_d));
      assert (!(id_ex_q.ctrl.use_rs1 && fwd_a_e == FWD_MEM && ex_mem_q.mem_to_reg));
      assert (!(id_ex_q.ctrl.use_rs2 && fwd_b_e == FWD_MEM && ex_mem_q.mem_to_reg));
    end
  end

endmodule
