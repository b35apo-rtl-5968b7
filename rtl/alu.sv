// alu: the EX-stage arithmetic/logic unit of the pipeline.
// It computes a + b, a - b, a & b, a | b or the signed set-less-than of its
// two 32-bit operands, as chosen by `op`, and flags a zero result. The five
// operations are those needed by the instructions add, sub, and, or, slt,
// addi, lw and sw (address add); the encoding of `op` is this design's own.
// Purely combinational: the result is valid in the same cycle as the inputs.
module alu
  import pipe_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] y,
  output logic             zero
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_SLT: y = {{(WIDTH-1){1'b0}}, $signed(a) < $signed(b)};
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
