// cpu_top: the three processors of the design side by side, each with its
// own instruction and data memory and its own ports, sharing the clock and
// reset.
//   pl_*  five-stage pipelined processor (pipelined_cpu_system)
//   sc_*  single-cycle processor
//   pf_*  processor with instruction prefetch
// All three execute the same nine instructions with the same encodings, so
// one program can be loaded into each and their results and cycle counts
// compared: N hazard-free instructions take N cycles single-cycle, N + 1
// with prefetch and N + 4 pipelined, but the pipeline's clock period is the
// shortest. Each *_prog_* port writes one word per rising edge into that
// processor's instruction memory (byte address); load while `rst` is high.
// The data buses, PCs and retire pulses are brought out for observation.
module cpu_top
  import pipe_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // pipelined processor
  input  logic        pl_prog_we,
  input  logic [31:0] pl_prog_addr,
  input  logic [31:0] pl_prog_data,
  output logic [31:0] pl_pc,
  output logic        pl_dmem_we,
  output logic [31:0] pl_dmem_addr,
  output logic [31:0] pl_dmem_wdata,
  output logic        pl_retire,
  // single-cycle processor
  input  logic        sc_prog_we,
  input  logic [31:0] sc_prog_addr,
  input  logic [31:0] sc_prog_data,
  output logic [31:0] sc_pc,
  output logic        sc_dmem_we,
  output logic [31:0] sc_dmem_addr,
  output logic [31:0] sc_dmem_wdata,
  output logic        sc_retire,
  // prefetching processor
  input  logic        pf_prog_we,
  input  logic [31:0] pf_prog_addr,
  input  logic [31:0] pf_prog_data,
  output logic [31:0] pf_pc,
  output logic        pf_dmem_we,
  output logic [31:0] pf_dmem_addr,
  output logic [31:0] pf_dmem_wdata,
  output logic        pf_retire
);

  // ------------------------------------------------ five-stage pipeline
  logic [31:0] pl_instr, pl_dmem_rdata;

  pipelined_cpu_system #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .RESET_PC(RESET_PC))
    u_pl (
      .clk, .rst,
      .prog_we(pl_prog_we), .prog_addr(pl_prog_addr), .prog_data(pl_prog_data),
      .pc(pl_pc), .instr(pl_instr),
      .dmem_we(pl_dmem_we), .dmem_addr(pl_dmem_addr), .dmem_wdata(pl_dmem_wdata),
      .dmem_rdata(pl_dmem_rdata), .retire(pl_retire)
    );

  // ------------------------------------------------ single cycle
  logic [31:0] sc_instr, sc_dmem_rdata;

  single_cycle_cpu #(.RESET_PC(RESET_PC)) u_sc (
    .clk, .rst,
    .imem_addr(sc_pc), .imem_rdata(sc_instr),
    .dmem_addr(sc_dmem_addr), .dmem_wdata(sc_dmem_wdata), .dmem_we(sc_dmem_we),
    .dmem_rdata(sc_dmem_rdata), .retire(sc_retire)
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_sc_imem (
    .clk, .a(sc_pc), .rd(sc_instr),
    .load_we(sc_prog_we), .load_addr(sc_prog_addr), .load_data(sc_prog_data)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_sc_dmem (
    .clk, .we(sc_dmem_we), .a(sc_dmem_addr), .wd(sc_dmem_wdata), .rd(sc_dmem_rdata)
  );

  // ------------------------------------------------ prefetch
  logic [31:0] pf_instr, pf_dmem_rdata;

  prefetch_cpu #(.RESET_PC(RESET_PC)) u_pf (
    .clk, .rst,
    .imem_addr(pf_pc), .imem_rdata(pf_instr),
    .dmem_addr(pf_dmem_addr), .dmem_wdata(pf_dmem_wdata), .dmem_we(pf_dmem_we),
    .dmem_rdata(pf_dmem_rdata), .retire(pf_retire)
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_pf_imem (
    .clk, .a(pf_pc), .rd(pf_instr),
    .load_we(pf_prog_we), .load_addr(pf_prog_addr), .load_data(pf_prog_data)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_pf_dmem (
    .clk, .we(pf_dmem_we), .a(pf_dmem_addr), .wd(pf_dmem_wdata), .rd(pf_dmem_rdata)
  );

endmodule
