// hazard_unit: forwarding, stall and flush control of the five-stage pipeline.
// Data hazards: when a source register of the instruction in EX equals the
// destination of a register-writing instruction in MEM or WB (never x0), the
// ALU operand is taken from that stage instead of the stale ID read; MEM has
// priority because it holds the younger result. The branch comparator in ID
// gets the MEM-stage ALU result the same way. A load followed at once by a
// user of its result cannot be forwarded in time: IF and ID are held for one
// cycle and a bubble is put into EX (load-use stall). A beq in ID whose
// operand is still being computed in EX, or is being loaded in MEM, is held
// the same way (branch stall). A taken beq flushes the instruction fetched
// behind it. All outputs are combinational functions of the current stage
// contents.
module hazard_unit
  import pipe_pkg::*;
(
  // ID stage
  input  logic [4:0] rs1_d,
  input  logic [4:0] rs2_d,
  input  logic       use_rs1_d,
  input  logic       use_rs2_d,
  input  logic       branch_d,
  input  logic       branch_eq_d,   // comparator result for the beq in ID
  // EX stage
  input  logic [4:0] rs1_e,
  input  logic [4:0] rs2_e,
  input  logic [4:0] rd_e,
  input  logic       reg_write_e,
  input  logic       mem_to_reg_e,
  // MEM stage
  input  logic [4:0] rd_m,
  input  logic       reg_write_m,
  input  logic       mem_to_reg_m,
  // WB stage
  input  logic [4:0] rd_w,
  input  logic       reg_write_w,
  // forwarding selects
  output fwd_sel_e   fwd_a_e,
  output fwd_sel_e   fwd_b_e,
  output logic       fwd_a_d,      // comparator operand A from MEM ALU result
  output logic       fwd_b_d,
  // pipeline control
  output logic       stall_f,
  output logic       stall_d,
  output logic       flush_d,
  output logic       flush_e,
  output logic       pc_src_d,     // take the branch target
  output logic       lw_stall,
  output logic       branch_stall
);

  function automatic fwd_sel_e fwd_ex(input logic [4:0] rs);
    if (rs != '0 && reg_write_m && rs == rd_m)      return FWD_MEM;
    else if (rs != '0 && reg_write_w && rs == rd_w) return FWD_WB;
    else                                            return FWD_NONE;
  endfunction

  logic dep_e, dep_m;

  always_comb begin
    fwd_a_e = fwd_ex(rs1_e);
    fwd_b_e = fwd_ex(rs2_e);
    fwd_a_d = rs1_d != '0 && reg_write_m && rs1_d == rd_m;
    fwd_b_d = rs2_d != '0 && reg_write_m && rs2_d == rd_m;

    // ID-stage source matches the destination of the instruction in EX / MEM.
    dep_e = rd_e != '0 && ((use_rs1_d && rs1_d == rd_e) || (use_rs2_d && rs2_d == rd_e));
    dep_m = rd_m != '0 && ((use_rs1_d && rs1_d == rd_m) || (use_rs2_d && rs2_d == rd_m));

    lw_stall     = mem_to_reg_e && dep_e;
    branch_stall = branch_d && ((reg_write_e && dep_e) || (mem_to_reg_m && dep_m));

    stall_f  = lw_stall || branch_stall;
    stall_d  = stall_f;
    flush_e  = stall_f;
    pc_src_d = branch_d && branch_eq_d && !stall_d;
    flush_d  = pc_src_d;
  end

endmodule
