// eq_comparator: the ID-stage branch comparator used by beq.
// Moving the branch decision into ID needs a comparison next to the
// register file; a full subtractor would be slow, so only equality is
// tested: the operands are XORed bit by bit and the result NORed into one
// bit, which is 1 when the operands are equal. Combinational.
module eq_comparator #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq
);

  assign eq = ~|(a ^ b);

endmodule
