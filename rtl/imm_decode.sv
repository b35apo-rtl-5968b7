// imm_decode: builds the sign-extended 32-bit immediate from an instruction.
// The I format (addi, lw) takes instr[31:20]; the S format (sw) joins
// instr[31:25] and instr[11:7]; the B format (beq) joins instr[31], instr[7],
// instr[30:25] and instr[11:8] with a zero least significant bit, giving a
// byte offset. Bit positions follow the RV32I instruction formats.
// Purely combinational.
module imm_decode
  import pipe_pkg::*;
(
  input  logic [31:0] instr,
  input  imm_sel_e    sel,
  output logic [31:0] imm
);

  always_comb begin
    unique case (sel)
      IMM_I:   imm = {{20{instr[31]}}, instr[31:20]};
      IMM_S:   imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B:   imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
