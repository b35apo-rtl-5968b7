// rv_asm_pkg: testbench helpers that encode the nine supported instructions
// into RV32I machine words (a tiny assembler), plus an instruction-level
// reference model used to predict register and memory contents.
package rv_asm_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rd, rs1, rs2,
                                         input logic [2:0] f3);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), 7'b0110011};
  endfunction

  function automatic logic [31:0] add_ (input int rd, rs1, rs2); return r_type(7'h00, rd, rs1, rs2, 3'b000); endfunction
  function automatic logic [31:0] sub_ (input int rd, rs1, rs2); return r_type(7'h20, rd, rs1, rs2, 3'b000); endfunction
  function automatic logic [31:0] and_ (input int rd, rs1, rs2); return r_type(7'h00, rd, rs1, rs2, 3'b111); endfunction
  function automatic logic [31:0] or_  (input int rd, rs1, rs2); return r_type(7'h00, rd, rs1, rs2, 3'b110); endfunction
  function automatic logic [31:0] slt_ (input int rd, rs1, rs2); return r_type(7'h00, rd, rs1, rs2, 3'b010); endfunction

  function automatic logic [31:0] addi_(input int rd, rs1, imm);
    return {12'(imm), 5'(rs1), 3'b000, 5'(rd), 7'b0010011};
  endfunction
  function automatic logic [31:0] lw_(input int rd, imm, rs1);
    return {12'(imm), 5'(rs1), 3'b010, 5'(rd), 7'b0000011};
  endfunction
  function automatic logic [31:0] sw_(input int rs2, imm, rs1);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'b010, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] beq_(input int rs1, rs2, off);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'b000, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] nop_(); return 32'h0000_0013; endfunction

  // Number of taken branches seen by the last iss_run call.
  int iss_taken;

  // Instruction-level reference: executes `n` steps of `prog` starting at pc 0
  // (or until the pc stays on a beq x0,x0,0 self-loop) and leaves the
  // architectural state in `regs`/`dmem`. Returns the number of instructions
  // executed before reaching the self-loop.
  function automatic int iss_run(input logic [31:0] prog [], ref logic [31:0] regs [32],
                                 ref logic [31:0] dmem [], input int max_steps);
    logic [31:0] pc = 0, ins, a, b, imm;
    int steps = 0;
    int dw = dmem.size();
    iss_taken = 0;
    while (steps < max_steps) begin
      ins = (pc / 4 < prog.size()) ? prog[pc/4] : 32'h13;
      if (ins == beq_(0, 0, 0)) break;
      a = regs[ins[19:15]];
      b = regs[ins[24:20]];
      steps++;
      case (ins[6:0])
        7'b0110011: begin
          logic [31:0] y;
          case ({ins[31:25], ins[14:12]})
            {7'h00, 3'b000}: y = a + b;
            {7'h20, 3'b000}: y = a - b;
            {7'h00, 3'b111}: y = a & b;
            {7'h00, 3'b110}: y = a | b;
            default:         y = ($signed(a) < $signed(b)) ? 1 : 0;
          endcase
          if (ins[11:7] != 0) regs[ins[11:7]] = y;
          pc += 4;
        end
        7'b0010011: begin
          imm = {{20{ins[31]}}, ins[31:20]};
          if (ins[11:7] != 0) regs[ins[11:7]] = a + imm;
          pc += 4;
        end
        7'b0000011: begin
          imm = {{20{ins[31]}}, ins[31:20]};
          if (ins[11:7] != 0) regs[ins[11:7]] = dmem[((a + imm) >> 2) % dw];
          pc += 4;
        end
        7'b0100011: begin
          imm = {{20{ins[31]}}, ins[31:25], ins[11:7]};
          dmem[((a + imm) >> 2) % dw] = b;
          pc += 4;
        end
        7'b1100011: begin
          imm = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
          if (a == b) iss_taken++;
          pc = (a == b) ? pc + imm : pc + 4;
        end
        default: pc += 4;
      endcase
    end
    return steps;
  endfunction

endpackage
