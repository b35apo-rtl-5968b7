// pipelined_cpu_system: the five-stage pipelined RV32 processor together with
// its instruction memory and data memory, which sit outside the processor and
// are reached through address/data buses (Harvard organisation: separate
// instruction and data memories).
//
// Before releasing reset, a host writes the program into instruction memory
// through the load port (one word per clock edge, byte address). After reset
// the core fetches from RESET_PC. The data bus and the PC are brought out for
// observation; `retire` pulses for every completed instruction.
module pipelined_cpu_system
  import pipe_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // program load port of the instruction memory
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  // observation
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic [31:0] dmem_rdata,
  output logic        retire
);

  riscv_pipeline #(.RESET_PC(RESET_PC)) u_core (
    .clk, .rst,
    .imem_addr(pc), .imem_rdata(instr),
    .dmem_addr, .dmem_wdata, .dmem_we, .dmem_rdata,
    .retire
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .a(pc), .rd(instr),
    .load_we(prog_we), .load_addr(prog_addr), .load_data(prog_data)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(dmem_we), .a(dmem_addr), .wd(dmem_wdata), .rd(dmem_rdata)
  );

endmodule
