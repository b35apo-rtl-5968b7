// tb_control_unit: decodes each of the nine instructions (with random
// register fields and immediates) and a set of unsupported encodings, and
// compares the control word with a table written out by hand.
module tb_control_unit;
  import pipe_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] instr;
  ctrl_t ctrl;
  logic legal;
  int checks = 0, failures = 0;

  control_unit dut (.instr, .ctrl, .legal);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {reg_write, mem_to_reg, mem_write, branch, alu_src, use_rs1, use_rs2}
  task automatic check(input string nm, input logic [31:0] ins, input logic [6:0] flags,
                       input alu_op_e op, input imm_sel_e isel, input logic lg);
    instr = ins;
    #1;
    checks++;
    if (legal !== lg ||
        {ctrl.reg_write, ctrl.mem_to_reg, ctrl.mem_write, ctrl.branch, ctrl.alu_src,
         ctrl.use_rs1, ctrl.use_rs2} !== flags ||
        (lg && ctrl.alu_op !== op) || (lg && ctrl.imm_sel !== isel)) begin
      failures++;
      $display("FAIL %s instr=%h ctrl=%p legal=%b", nm, ins, ctrl, legal);
    end
  endtask

  initial begin
    int rd, rs1, rs2, imm;
    for (int i = 0; i < 50; i++) begin
      rd = $urandom % 32; rs1 = $urandom % 32; rs2 = $urandom % 32; imm = $urandom % 4096 - 2048;
      check("add",  add_(rd, rs1, rs2),  7'b1000011, ALU_ADD, IMM_I, 1);
      check("sub",  sub_(rd, rs1, rs2),  7'b1000011, ALU_SUB, IMM_I, 1);
      check("and",  and_(rd, rs1, rs2),  7'b1000011, ALU_AND, IMM_I, 1);
      check("or",   or_(rd, rs1, rs2),   7'b1000011, ALU_OR,  IMM_I, 1);
      check("slt",  slt_(rd, rs1, rs2),  7'b1000011, ALU_SLT, IMM_I, 1);
      check("addi", addi_(rd, rs1, imm), 7'b1000110, ALU_ADD, IMM_I, 1);
      check("lw",   lw_(rd, imm, rs1),   7'b1100110, ALU_ADD, IMM_I, 1);
      check("sw",   sw_(rs2, imm, rs1),  7'b0010111, ALU_ADD, IMM_S, 1);
      check("beq",  beq_(rs1, rs2, (imm * 2)), 7'b0001011, ALU_SUB, IMM_B, 1);
      // unsupported: xor, lui, jal, lh, sb, bne, slli
      check("xor",  r_type(7'h00, rd, rs1, rs2, 3'b100), 7'b0, ALU_ADD, IMM_I, 0);
      check("lui",  {20'($urandom), 5'(rd), 7'b0110111}, 7'b0, ALU_ADD, IMM_I, 0);
      check("jal",  {20'($urandom), 5'(rd), 7'b1101111}, 7'b0, ALU_ADD, IMM_I, 0);
      check("lh",   {12'(imm), 5'(rs1), 3'b001, 5'(rd), 7'b0000011}, 7'b0, ALU_ADD, IMM_I, 0);
      check("sb",   {7'd0, 5'(rs2), 5'(rs1), 3'b000, 5'd0, 7'b0100011}, 7'b0, ALU_ADD, IMM_I, 0);
      check("bne",  {7'd0, 5'(rs2), 5'(rs1), 3'b001, 5'd0, 7'b1100011}, 7'b0, ALU_ADD, IMM_I, 0);
      check("slli", {7'd0, 5'(rs2), 5'(rs1), 3'b001, 5'(rd), 7'b0010011}, 7'b0, ALU_ADD, IMM_I, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
