// control_unit: ID-stage instruction decoder of the pipeline.
// From opcode, funct3 and funct7 it produces the control word that travels
// with the instruction: register write, memory-to-register, memory write,
// branch, ALU source and operation, immediate format and which source
// registers are read. Supported are add, sub, and, or, slt (R type), addi,
// lw (I type), sw (S type) and beq (B type) with RV32I encodings. Any other
// encoding decodes as a bubble that writes nothing. Combinational.
module control_unit
  import pipe_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl,
  output logic        legal
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [6:0] funct7;

  assign opcode = instr[6:0];
  assign funct3 = instr[14:12];
  assign funct7 = instr[31:25];

  always_comb begin
    ctrl  = CTRL_NOP;
    legal = 1'b1;
    unique case (opcode)
      OP_R: begin
        ctrl.reg_write = 1'b1;
        ctrl.use_rs1   = 1'b1;
        ctrl.use_rs2   = 1'b1;
        unique case ({funct7, funct3})
          {7'b0000000, 3'b000}: ctrl.alu_op = ALU_ADD;
          {7'b0100000, 3'b000}: ctrl.alu_op = ALU_SUB;
          {7'b0000000, 3'b111}: ctrl.alu_op = ALU_AND;
          {7'b0000000, 3'b110}: ctrl.alu_op = ALU_OR;
          {7'b0000000, 3'b010}: ctrl.alu_op = ALU_SLT;
          default: begin
            ctrl  = CTRL_NOP;
            legal = 1'b0;
          end
        endcase
      end
      OP_IMM: begin
        if (funct3 == 3'b000) begin
          ctrl.reg_write = 1'b1;
          ctrl.alu_src   = 1'b1;
          ctrl.use_rs1   = 1'b1;
          ctrl.imm_sel   = IMM_I;
        end else begin
          legal = 1'b0;
        end
      end
      OP_LOAD: begin
        if (funct3 == 3'b010) begin
          ctrl.reg_write  = 1'b1;
          ctrl.mem_to_reg = 1'b1;
          ctrl.alu_src    = 1'b1;
          ctrl.use_rs1    = 1'b1;
          ctrl.imm_sel    = IMM_I;
        end else begin
          legal = 1'b0;
        end
      end
      OP_STORE: begin
        if (funct3 == 3'b010) begin
          ctrl.mem_write = 1'b1;
          ctrl.alu_src   = 1'b1;
          ctrl.use_rs1   = 1'b1;
          ctrl.use_rs2   = 1'b1;
          ctrl.imm_sel   = IMM_S;
        end else begin
          legal = 1'b0;
        end
      end
      OP_BR: begin
        if (funct3 == 3'b000) begin
          ctrl.branch  = 1'b1;
          ctrl.alu_op  = ALU_SUB;
          ctrl.use_rs1 = 1'b1;
          ctrl.use_rs2 = 1'b1;
          ctrl.imm_sel = IMM_B;
        end else begin
          legal = 1'b0;
        end
      end
      default: legal = 1'b0;
    endcase
  end

endmodule
