// instr_mem: instruction memory outside the processor.
// A word-organised array read combinationally at the byte address `a`
// (bits [1:0] ignored), as the lecture's memory block with address input A
// and read output RD. A second, write-only port loads the program before the
// processor runs; it writes one word per rising clock edge. The size is a
// parameter; the lecture gives none. An address beyond the array reads as
// the nop instruction addi x0, x0, 0.
module instr_mem
  import pipe_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] a,
  output logic [31:0] rd,
  // program load port
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we && load_addr[31:2] < 30'(WORDS)) mem[load_addr[AW+1:2]] <= load_data;
  end

  assign rd = (a[31:2] < 30'(WORDS)) ? mem[a[AW+1:2]] : INSTR_NOP;

endmodule
