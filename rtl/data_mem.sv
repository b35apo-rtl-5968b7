// data_mem: data memory outside the processor, accessed by lw and sw.
// A word-organised array with a combinational read at byte address `a`
// (bits [1:0] ignored) and a write of `wd` at the rising clock edge when
// `we` is high, the memory block of the lecture with inputs A, WD, WE and
// output RD. Addresses wrap modulo the array size. The size is a parameter;
// the lecture gives none. Reset clears no data.
module data_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] a,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[a[AW+1:2]] <= wd;
  end

  assign rd = mem[a[AW+1:2]];

endmodule
