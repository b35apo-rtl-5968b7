// tb_pipelined_cpu_system: end-to-end test of the processor with its
// instruction and data memories, at the default sizes. It loads programs
// through the instruction-memory load port: first the two hazard programs
// of the pipeline walk-through (ALU hazards, load hazards), then random
// programs of the nine instructions using few registers (so that hazards
// are frequent), forward branches and loads/stores over the whole data
// memory. Final registers and data memory are compared with the
// instruction-level reference model; the program cycle count is compared
// with instructions + 4 + stalls + flushes. Each hazard mechanism (forward
// from MEM, forward from WB, register-file write-through, forward into the
// branch comparator, load-use stall, branch stall, taken-branch flush) is
// counted and must occur at least once.
module tb_pipelined_cpu_system;
  import pipe_pkg::*;
  import rv_asm_pkg::*;

  localparam int IW = 256, DW = 256;
  localparam int NPROG = 200;

  logic clk = 0, rst;
  logic prog_we;
  logic [31:0] prog_addr, prog_data, pc, instr, dmem_addr, dmem_wdata, dmem_rdata;
  logic dmem_we, retire;
  int checks = 0, failures = 0;
  int n_fwd_mem = 0, n_fwd_wb = 0, n_wt = 0, n_fwd_id = 0, n_lw_stall = 0, n_br_stall = 0,
      n_flush = 0, n_stores = 0;
  logic count_en = 0;

  pipelined_cpu_system dut (.clk, .rst, .prog_we, .prog_addr, .prog_data, .pc, .instr,
                            .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata, .retire);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled at each clock edge.
  always @(posedge clk) if (count_en && !rst) begin
    if ((dut.u_core.id_ex_q.ctrl.use_rs1 && dut.u_core.fwd_a_e == FWD_MEM) ||
        (dut.u_core.id_ex_q.ctrl.use_rs2 && dut.u_core.fwd_b_e == FWD_MEM)) n_fwd_mem++;
    if ((dut.u_core.id_ex_q.ctrl.use_rs1 && dut.u_core.fwd_a_e == FWD_WB) ||
        (dut.u_core.id_ex_q.ctrl.use_rs2 && dut.u_core.fwd_b_e == FWD_WB)) n_fwd_wb++;
    if (dut.u_core.reg_write_w && dut.u_core.rd_w != 0 &&
        ((dut.u_core.ctrl_d.use_rs1 && dut.u_core.rs1_d == dut.u_core.rd_w) ||
         (dut.u_core.ctrl_d.use_rs2 && dut.u_core.rs2_d == dut.u_core.rd_w))) n_wt++;
    if (dut.u_core.ctrl_d.branch && !dut.u_core.stall_d &&
        (dut.u_core.fwd_a_d || dut.u_core.fwd_b_d)) n_fwd_id++;
    if (dut.u_core.lw_stall) n_lw_stall++;
    if (dut.u_core.branch_stall) n_br_stall++;
    if (dut.u_core.flush_d) n_flush++;
    if (dmem_we) n_stores++;
  end

  function automatic logic [31:0] rand_instr(input int idx, input int len);
    int rd = $urandom % 8, rs1 = $urandom % 8, rs2 = $urandom % 8;
    int k = $urandom % 100;
    int off = 4 * (1 + $urandom % 3);
    if (k < 10) return add_(rd, rs1, rs2);
    if (k < 18) return sub_(rd, rs1, rs2);
    if (k < 24) return and_(rd, rs1, rs2);
    if (k < 30) return or_(rd, rs1, rs2);
    if (k < 36) return slt_(rd, rs1, rs2);
    if (k < 56) return addi_(rd, rs1, int'($urandom % 64) - 32);
    if (k < 66) return lw_(rd, 4 * ($urandom % 256), 0);
    if (k < 71) return lw_(rd, 4 * ($urandom % 8), rs1);
    if (k < 80) return sw_(rs2, 4 * ($urandom % 256), 0);
    if (k < 84) return sw_(rs2, 4 * ($urandom % 8), rs1);
    if (idx * 4 + off < len * 4) return beq_(rs1, rs2, off);
    return addi_(rd, rs1, 1);
  endfunction

  task automatic run(input string nm, input logic [31:0] prog [], input int max_cycles,
                     input int exp_cycles);
    logic [31:0] ref_regs [32];
    logic [31:0] ref_dmem [];
    logic [31:0] full [];
    int n, cyc, retired, last, stalls0, flush0;
    full = new[IW];
    ref_dmem = new[DW];
    foreach (full[i]) full[i] = (i < prog.size()) ? prog[i] : beq_(0, 0, 0);
    // load the program through the load port while in reset
    rst = 1;
    prog_we = 1;
    for (int i = 0; i < IW; i++) begin
      prog_addr = 32'(i * 4); prog_data = full[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    for (int i = 0; i < DW; i++) begin
      dut.u_dmem.mem[i] = $urandom;
      ref_dmem[i] = dut.u_dmem.mem[i];
    end
    foreach (ref_regs[i]) ref_regs[i] = 0;
    n = iss_run(full, ref_regs, ref_dmem, 100000);
    @(posedge clk); #1;
    stalls0 = n_lw_stall + n_br_stall; flush0 = n_flush;
    rst = 0;
    count_en = 1;
    cyc = 0; retired = 0; last = -1;
    while (cyc < max_cycles && last < 0) begin
      @(posedge clk);
      cyc++;
      if (retire) begin
        retired++;
        if (retired == n) last = cyc;
      end
    end
    repeat (6) @(posedge clk);
    count_en = 0;
    // cycle count: every instruction one cycle, plus fill, stalls and flushes
    // (counted up to the last retirement)
    checks++;
    if (exp_cycles >= 0 && last != exp_cycles) begin
      failures++;
      $display("FAIL %s: done after %0d cycles, expected %0d", nm, last, exp_cycles);
    end
    checks++;
    if (last < 0 || last < n + 4) begin
      failures++;
      $display("FAIL %s: %0d of %0d instructions retired", nm, retired, n);
    end
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (dut.u_core.u_rf.regs[r] !== ref_regs[r]) begin
        failures++;
        $display("FAIL %s: x%0d = %h, expected %h", nm, r, dut.u_core.u_rf.regs[r], ref_regs[r]);
      end
    end
    for (int i = 0; i < DW; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== ref_dmem[i]) begin
        failures++;
        $display("FAIL %s: mem[%0d] = %h, expected %h", nm, i, dut.u_dmem.mem[i], ref_dmem[i]);
      end
    end
  endtask

  initial begin
    logic [31:0] p [];
    int len;
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0;
    // ALU-hazard sequence: add s0; and t0,s0,s1; or t1,s4,s0; sub t2,s0,s5
    p = '{addi_(18, 0, 5), addi_(19, 0, 7), addi_(9, 0, 6), addi_(20, 0, 8), addi_(21, 0, 1),
          add_(8, 18, 19), and_(5, 8, 9), or_(6, 20, 8), sub_(7, 8, 21)};
    run("alu-hazards", p, 100, 9 + 4);
    // Load-hazard sequence: lw s0,40(zero); and; or; sub  (one stall)
    p = '{addi_(9, 0, 6), addi_(20, 0, 8), addi_(21, 0, 1),
          lw_(8, 40, 0), and_(5, 8, 9), or_(6, 20, 8), sub_(7, 8, 21)};
    run("lw-hazards", p, 100, 7 + 4 + 1);
    // Branch sequence: at 0x20 beq t1,t2,0x40 is taken; the and fetched behind
    // it is flushed and slt t3,s2,s3 at 0x60 follows (one flush cycle).
    p = new[26];
    foreach (p[i]) p[i] = nop_();
    p[0] = addi_(6, 0, 3); p[1] = addi_(7, 0, 3); p[2] = addi_(8, 0, 12); p[3] = addi_(9, 0, 6);
    p[4] = addi_(18, 0, 4); p[5] = addi_(19, 0, 9); p[6] = addi_(20, 0, 1);
    p[8]  = beq_(6, 7, 32'h40);   // 0x20
    p[9]  = and_(5, 8, 9);        // 0x24, flushed
    p[10] = or_(6, 20, 8);        // 0x28, skipped
    p[24] = slt_(28, 18, 19);     // 0x60
    p[25] = beq_(0, 0, 0);
    run("branch-flush", p, 100, 10 + 4 + 1);
    // Random programs
    for (int t = 0; t < NPROG; t++) begin
      len = 20 + $urandom % 200;
      p = new[len];
      for (int i = 0; i < len; i++) p[i] = rand_instr(i, len);
      run($sformatf("random%0d", t), p, 8 * len + 50, -1);
    end
    $display("mechanisms: fwd_mem=%0d fwd_wb=%0d rf_write_through=%0d fwd_to_branch=%0d lw_stall=%0d branch_stall=%0d flush=%0d stores=%0d",
             n_fwd_mem, n_fwd_wb, n_wt, n_fwd_id, n_lw_stall, n_br_stall, n_flush, n_stores);
    checks += 8;
    if (n_fwd_mem == 0)  begin failures++; $display("FAIL forwarding from MEM never happened"); end
    if (n_fwd_wb == 0)   begin failures++; $display("FAIL forwarding from WB never happened"); end
    if (n_wt == 0)       begin failures++; $display("FAIL register-file write-through never happened"); end
    if (n_fwd_id == 0)   begin failures++; $display("FAIL forwarding into the branch comparator never happened"); end
    if (n_lw_stall == 0) begin failures++; $display("FAIL load-use stall never happened"); end
    if (n_br_stall == 0) begin failures++; $display("FAIL branch stall never happened"); end
    if (n_flush == 0)    begin failures++; $display("FAIL taken-branch flush never happened"); end
    if (n_stores == 0)   begin failures++; $display("FAIL no store happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
