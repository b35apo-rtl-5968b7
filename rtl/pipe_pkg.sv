// pipe_pkg: types and constants shared by the five-stage RV32 pipeline.
// The instruction set is the nine-instruction subset add, sub, and, or, slt,
// addi, lw, sw and beq, with the standard RV32I encodings. The ALU operation
// codes, the result-select encoding and the forwarding-select encoding are
// this design's own choice; the stage structure (IF, ID, EX, MEM, WB) and the
// forwarding sources (MEM and WB results into EX) follow the lecture design.
package pipe_pkg;


  // Major opcodes (instr[6:0]) of the supported instructions.
  localparam logic [6:0] OP_R    = 7'b0110011;  // add, sub, and, or, slt
  localparam logic [6:0] OP_IMM  = 7'b0010011;  // addi
  localparam logic [6:0] OP_LOAD = 7'b0000011;  // lw
  localparam logic [6:0] OP_STORE= 7'b0100011;  // sw
  localparam logic [6:0] OP_BR   = 7'b1100011;  // beq

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4
  } alu_op_e;

  // Immediate formats produced by the immediate decoder.
  typedef enum logic [1:0] {
    IMM_I = 2'd0,
    IMM_S = 2'd1,
    IMM_B = 2'd2
  } imm_sel_e;

  // Selection of an EX-stage ALU operand.
  typedef enum logic [1:0] {
    FWD_NONE = 2'd0,   // value read from the register file in ID
    FWD_WB   = 2'd1,   // result being written back (WB stage)
    FWD_MEM  = 2'd2    // ALU result held in the MEM stage
  } fwd_sel_e;

  // Control word produced in ID and carried down the pipeline.
  typedef struct packed {
    logic     reg_write;   // instruction writes rd
    logic     mem_to_reg;  // WB result comes from data memory (lw)
    logic     mem_write;   // store to data memory (sw)
    logic     branch;      // beq
    logic     alu_src;     // ALU operand B is the immediate
    alu_op_e  alu_op;
    imm_sel_e imm_sel;
    logic     use_rs1;     // rs1 field names a source register
    logic     use_rs2;     // rs2 field names a source register
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{reg_write: 1'b0, mem_to_reg: 1'b0, mem_write: 1'b0,
                                 branch: 1'b0, alu_src: 1'b0, alu_op: ALU_ADD,
                                 imm_sel: IMM_I, use_rs1: 1'b0, use_rs2: 1'b0};

  // Canonical nop: addi x0, x0, 0.
  localparam logic [31:0] INSTR_NOP = 32'h0000_0013;

  // Pipeline register contents.
  typedef struct packed {
    logic        valid;
    logic [31:0] instr;
    logic [31:0] pc;
  } if_id_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [31:0] rd1;
    logic [31:0] rd2;
    logic [31:0] imm;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
  } id_ex_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic        mem_to_reg;
    logic        mem_write;
    logic [31:0] alu_out;
    logic [31:0] write_data;
    logic [4:0]  rd;
  } ex_mem_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic        mem_to_reg;
    logic [31:0] alu_out;
    logic [31:0] read_data;
    logic [4:0]  rd;
  } mem_wb_t;

endpackage
