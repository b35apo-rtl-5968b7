// tb_hazard_unit: directed cases for each hazard the pipeline resolves (MEM
// and WB forwarding, their priority, x0, load-use stall, branch stalls,
// taken-branch flush) followed by random stage contents checked against a
// reference written from the forwarding and stall rules.
module tb_hazard_unit;
  import pipe_pkg::*;
  logic [4:0] rs1_d, rs2_d, rs1_e, rs2_e, rd_e, rd_m, rd_w;
  logic use_rs1_d, use_rs2_d, branch_d, branch_eq_d;
  logic reg_write_e, mem_to_reg_e, reg_write_m, mem_to_reg_m, reg_write_w;
  fwd_sel_e fwd_a_e, fwd_b_e;
  logic fwd_a_d, fwd_b_d, stall_f, stall_d, flush_d, flush_e, pc_src_d, lw_stall, branch_stall;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_all();
    {rs1_d, rs2_d, rs1_e, rs2_e, rd_e, rd_m, rd_w} = '0;
    {use_rs1_d, use_rs2_d, branch_d, branch_eq_d} = '0;
    {reg_write_e, mem_to_reg_e, reg_write_m, mem_to_reg_m, reg_write_w} = '0;
  endtask

  task automatic expect_out(input string nm, input fwd_sel_e ea, eb, input logic ead, ebd,
                            input logic stall, flushd, lws, brs);
    #1;
    checks++;
    if (fwd_a_e !== ea || fwd_b_e !== eb || fwd_a_d !== ead || fwd_b_d !== ebd ||
        stall_f !== stall || stall_d !== stall || flush_e !== stall || flush_d !== flushd ||
        pc_src_d !== flushd || lw_stall !== lws || branch_stall !== brs) begin
      failures++;
      $display("FAIL %s: fa=%0d fb=%0d fad=%b fbd=%b st=%b fd=%b lw=%b br=%b", nm,
               fwd_a_e, fwd_b_e, fwd_a_d, fwd_b_d, stall_f, flush_d, lw_stall, branch_stall);
    end
  endtask

  // Reference written from the rules, used for the random part.
  task automatic check_random();
    fwd_sel_e ea, eb;
    logic ead, ebd, lws, brs, dep_e, dep_m;
    ea = (rs1_e != 0 && reg_write_m && rs1_e == rd_m) ? FWD_MEM :
         (rs1_e != 0 && reg_write_w && rs1_e == rd_w) ? FWD_WB : FWD_NONE;
    eb = (rs2_e != 0 && reg_write_m && rs2_e == rd_m) ? FWD_MEM :
         (rs2_e != 0 && reg_write_w && rs2_e == rd_w) ? FWD_WB : FWD_NONE;
    ead = rs1_d != 0 && reg_write_m && rs1_d == rd_m;
    ebd = rs2_d != 0 && reg_write_m && rs2_d == rd_m;
    dep_e = rd_e != 0 && ((use_rs1_d && rs1_d == rd_e) || (use_rs2_d && rs2_d == rd_e));
    dep_m = rd_m != 0 && ((use_rs1_d && rs1_d == rd_m) || (use_rs2_d && rs2_d == rd_m));
    lws = mem_to_reg_e && dep_e;
    brs = branch_d && ((reg_write_e && dep_e) || (mem_to_reg_m && dep_m));
    expect_out("random", ea, eb, ead, ebd, lws | brs, branch_d & branch_eq_d & ~(lws | brs), lws, brs);
  endtask

  initial begin
    // and t0,s0,s1 in EX after add s0 in MEM: rs1 from MEM
    clear_all(); rs1_e = 8; rs2_e = 9; rd_m = 8; reg_write_m = 1;
    expect_out("mem->ex A", FWD_MEM, FWD_NONE, 0, 0, 0, 0, 0, 0);
    // or t1,s4,s0 in EX after add s0 in WB: rs2 from WB
    clear_all(); rs1_e = 20; rs2_e = 8; rd_w = 8; reg_write_w = 1;
    expect_out("wb->ex B", FWD_NONE, FWD_WB, 0, 0, 0, 0, 0, 0);
    // both stages write the register: MEM wins
    clear_all(); rs1_e = 5; rs2_e = 5; rd_m = 5; reg_write_m = 1; rd_w = 5; reg_write_w = 1;
    expect_out("mem priority", FWD_MEM, FWD_MEM, 0, 0, 0, 0, 0, 0);
    // x0 is never forwarded
    clear_all(); rs1_e = 0; rs2_e = 0; rd_m = 0; reg_write_m = 1; rd_w = 0; reg_write_w = 1;
    expect_out("x0", FWD_NONE, FWD_NONE, 0, 0, 0, 0, 0, 0);
    // RegWrite low: no forwarding
    clear_all(); rs1_e = 7; rd_m = 7; rd_w = 7;
    expect_out("no regwrite", FWD_NONE, FWD_NONE, 0, 0, 0, 0, 0, 0);
    // lw s0 in EX, and t0,s0,s1 in ID: load-use stall
    clear_all(); rd_e = 8; reg_write_e = 1; mem_to_reg_e = 1; rs1_d = 8; rs2_d = 9;
    use_rs1_d = 1; use_rs2_d = 1;
    expect_out("lw stall", FWD_NONE, FWD_NONE, 0, 0, 1, 0, 1, 0);
    // lw in EX, addi whose imm field looks like rd_e: no stall
    clear_all(); rd_e = 8; reg_write_e = 1; mem_to_reg_e = 1; rs1_d = 3; rs2_d = 8; use_rs1_d = 1;
    expect_out("lw no use", FWD_NONE, FWD_NONE, 0, 0, 0, 0, 0, 0);
    // beq in ID reads the result of an ALU op in EX: branch stall, no flush
    clear_all(); rd_e = 6; reg_write_e = 1; rs1_d = 6; rs2_d = 7; use_rs1_d = 1; use_rs2_d = 1;
    branch_d = 1; branch_eq_d = 1;
    expect_out("branch stall ex", FWD_NONE, FWD_NONE, 0, 0, 1, 0, 0, 1);
    // beq in ID reads a load in MEM: branch stall
    clear_all(); rd_m = 7; reg_write_m = 1; mem_to_reg_m = 1; rs1_d = 6; rs2_d = 7;
    use_rs1_d = 1; use_rs2_d = 1; branch_d = 1;
    expect_out("branch stall mem lw", FWD_NONE, FWD_NONE, 0, 1, 1, 0, 0, 1);
    // beq in ID reads an ALU result in MEM: forwarded to comparator, taken, flush
    clear_all(); rd_m = 6; reg_write_m = 1; rs1_d = 6; rs2_d = 7; use_rs1_d = 1; use_rs2_d = 1;
    branch_d = 1; branch_eq_d = 1;
    expect_out("branch fwd taken", FWD_NONE, FWD_NONE, 1, 0, 0, 1, 0, 0);
    // beq not taken
    clear_all(); branch_d = 1; use_rs1_d = 1; use_rs2_d = 1; rs1_d = 1; rs2_d = 2;
    expect_out("branch not taken", FWD_NONE, FWD_NONE, 0, 0, 0, 0, 0, 0);
    for (int i = 0; i < 3000; i++) begin
      {rs1_d, rs2_d, rs1_e, rs2_e, rd_e, rd_m, rd_w} = {7{3'($urandom)}} & 35'h7_ffff_ffff;
      rs1_d = 5'($urandom % 4); rs2_d = 5'($urandom % 4); rs1_e = 5'($urandom % 4);
      rs2_e = 5'($urandom % 4); rd_e = 5'($urandom % 4); rd_m = 5'($urandom % 4); rd_w = 5'($urandom % 4);
      {use_rs1_d, use_rs2_d, branch_d, branch_eq_d} = 4'($urandom);
      {reg_write_e, mem_to_reg_e, reg_write_m, mem_to_reg_m, reg_write_w} = 5'($urandom);
      check_random();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
