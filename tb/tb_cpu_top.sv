// tb_cpu_top: end-to-end test of the three processors side by side, at the
// default sizes. The same program is loaded into the pipelined, the
// single-cycle and the prefetching processor through their load ports:
// first the ALU-hazard, load-hazard and branch sequences, then random
// programs of the nine instructions over few registers (frequent hazards),
// forward branches and loads/stores across the whole data memory. For each
// processor the final registers and data memory are compared with the
// instruction-level reference model, and the cycle in which the last
// instruction completes with its timing:
//   single-cycle  N
//   prefetch      N + 1 + taken branches
//   pipelined     N + 4 + stall and flush cycles spent before the last
//                 instruction leaves ID (exact value given for the directed
//                 sequences, cross-checked with the counted stall and
//                 flush cycles on every program)
// The pipeline's hazard mechanisms (forward from MEM, forward from WB,
// register-file write-through, forward into the branch comparator, load-use
// stall, branch stall, taken-branch flush) and the prefetching processor's
// branch discard are counted; one that never happens is a failure.
module tb_cpu_top;
  import pipe_pkg::*;
  import rv_asm_pkg::*;

  localparam int IW = 256, DW = 256;
  localparam int NPROG = 100;

  logic clk = 0, rst;
  logic prog_we;
  logic [31:0] prog_addr, prog_data;
  logic [31:0] pl_pc, pl_dmem_addr, pl_dmem_wdata, sc_pc, sc_dmem_addr, sc_dmem_wdata,
               pf_pc, pf_dmem_addr, pf_dmem_wdata;
  logic pl_dmem_we, pl_retire, sc_dmem_we, sc_retire, pf_dmem_we, pf_retire;
  int checks = 0, failures = 0;
  int n_fwd_mem = 0, n_fwd_wb = 0, n_wt = 0, n_fwd_id = 0, n_lw_stall = 0, n_br_stall = 0,
      n_flush = 0, n_pf_discard = 0;
  // ev_hist[c]: pipeline stall and flush cycles in cycles 1..c after reset
  int ev_hist [4096];
  int acyc;
  logic count_en = 0;

  always @(posedge clk) begin
    if (rst) begin
      acyc = 0;
      ev_hist[0] = 0;
    end else if (acyc < 4095) begin
      acyc++;
      ev_hist[acyc] = ev_hist[acyc-1] + int'(dut.u_pl.u_core.stall_d) + int'(dut.u_pl.u_core.flush_d);
    end
  end

  cpu_top dut (
    .clk, .rst,
    .pl_prog_we(prog_we), .pl_prog_addr(prog_addr), .pl_prog_data(prog_data),
    .pl_pc, .pl_dmem_we, .pl_dmem_addr, .pl_dmem_wdata, .pl_retire,
    .sc_prog_we(prog_we), .sc_prog_addr(prog_addr), .sc_prog_data(prog_data),
    .sc_pc, .sc_dmem_we, .sc_dmem_addr, .sc_dmem_wdata, .sc_retire,
    .pf_prog_we(prog_we), .pf_prog_addr(prog_addr), .pf_prog_data(prog_data),
    .pf_pc, .pf_dmem_we, .pf_dmem_addr, .pf_dmem_wdata, .pf_retire
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (count_en && !rst) begin
    if ((dut.u_pl.u_core.id_ex_q.ctrl.use_rs1 && dut.u_pl.u_core.fwd_a_e == FWD_MEM) ||
        (dut.u_pl.u_core.id_ex_q.ctrl.use_rs2 && dut.u_pl.u_core.fwd_b_e == FWD_MEM)) n_fwd_mem++;
    if ((dut.u_pl.u_core.id_ex_q.ctrl.use_rs1 && dut.u_pl.u_core.fwd_a_e == FWD_WB) ||
        (dut.u_pl.u_core.id_ex_q.ctrl.use_rs2 && dut.u_pl.u_core.fwd_b_e == FWD_WB)) n_fwd_wb++;
    if (dut.u_pl.u_core.reg_write_w && dut.u_pl.u_core.rd_w != 0 &&
        ((dut.u_pl.u_core.ctrl_d.use_rs1 && dut.u_pl.u_core.rs1_d == dut.u_pl.u_core.rd_w) ||
         (dut.u_pl.u_core.ctrl_d.use_rs2 && dut.u_pl.u_core.rs2_d == dut.u_pl.u_core.rd_w))) n_wt++;
    if (dut.u_pl.u_core.ctrl_d.branch && !dut.u_pl.u_core.stall_d &&
        (dut.u_pl.u_core.fwd_a_d || dut.u_pl.u_core.fwd_b_d)) n_fwd_id++;
    if (dut.u_pl.u_core.lw_stall) n_lw_stall++;
    if (dut.u_pl.u_core.branch_stall) n_br_stall++;
    if (dut.u_pl.u_core.flush_d) n_flush++;
    if (dut.u_pf.taken) n_pf_discard++;
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

  task automatic compare_state(input string nm, input string cpu, input logic [31:0] ref_regs [32],
                               input logic [31:0] ref_dmem []);
    logic [31:0] r, m;
    for (int i = 0; i < 32; i++) begin
      case (cpu)
        "pl": r = dut.u_pl.u_core.u_rf.regs[i];
        "sc": r = dut.u_sc.u_rf.regs[i];
        default: r = dut.u_pf.u_rf.regs[i];
      endcase
      checks++;
      if (r !== ref_regs[i]) begin
        failures++;
        $display("FAIL %s/%s: x%0d = %h, expected %h", nm, cpu, i, r, ref_regs[i]);
      end
    end
    for (int i = 0; i < DW; i++) begin
      case (cpu)
        "pl": m = dut.u_pl.u_dmem.mem[i];
        "sc": m = dut.u_sc_dmem.mem[i];
        default: m = dut.u_pf_dmem.mem[i];
      endcase
      checks++;
      if (m !== ref_dmem[i]) begin
        failures++;
        $display("FAIL %s/%s: mem[%0d] = %h, expected %h", nm, cpu, i, m, ref_dmem[i]);
      end
    end
  endtask

  task automatic check_cycles(input string nm, input string cpu, input int got, input int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s/%s: last instruction done in cycle %0d, expected %0d", nm, cpu, got, expv);
    end
  endtask

  task automatic run(input string nm, input logic [31:0] prog [], input int max_cycles,
                     input int exp_pl);
    logic [31:0] ref_regs [32];
    logic [31:0] ref_dmem [];
    logic [31:0] full [];
    int n, taken, cyc, r_pl, r_sc, r_pf, l_pl, l_sc, l_pf;
    full = new[IW];
    ref_dmem = new[DW];
    foreach (full[i]) full[i] = (i < prog.size()) ? prog[i] : beq_(0, 0, 0);
    rst = 1;
    prog_we = 1;
    for (int i = 0; i < IW; i++) begin
      prog_addr = 32'(i * 4); prog_data = full[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    for (int i = 0; i < DW; i++) begin
      ref_dmem[i] = $urandom;
      dut.u_pl.u_dmem.mem[i] = ref_dmem[i];
      dut.u_sc_dmem.mem[i] = ref_dmem[i];
      dut.u_pf_dmem.mem[i] = ref_dmem[i];
    end
    ref_dmem[10] = 32'h5555_5555;
    dut.u_pl.u_dmem.mem[10] = ref_dmem[10];
    dut.u_sc_dmem.mem[10] = ref_dmem[10];
    dut.u_pf_dmem.mem[10] = ref_dmem[10];
    foreach (ref_regs[i]) ref_regs[i] = 0;
    n = iss_run(full, ref_regs, ref_dmem, 100000);
    taken = iss_taken;
    @(posedge clk); #1;
    rst = 0;
    count_en = 1;
    cyc = 0; r_pl = 0; r_sc = 0; r_pf = 0; l_pl = -1; l_sc = -1; l_pf = -1;
    while (cyc < max_cycles && (l_pl < 0 || l_sc < 0 || l_pf < 0)) begin
      @(posedge clk);
      cyc++;
      if (pl_retire && ++r_pl == n) l_pl = cyc;
      if (sc_retire && ++r_sc == n) l_sc = cyc;
      if (pf_retire && ++r_pf == n) l_pf = cyc;
    end
    repeat (6) @(posedge clk);
    count_en = 0;
    check_cycles(nm, "sc", l_sc, n);
    check_cycles(nm, "pf", l_pf, n + 1 + taken);
    if (exp_pl >= 0) check_cycles(nm, "pl", l_pl, exp_pl);
    // stalls and flushes count while the last instruction has not yet left
    // ID, i.e. up to three cycles before it completes
    if (l_pl >= 3) check_cycles(nm, "pl-accounting", l_pl, n + 4 + ev_hist[l_pl - 3]);
    compare_state(nm, "pl", ref_regs, ref_dmem);
    compare_state(nm, "sc", ref_regs, ref_dmem);
    compare_state(nm, "pf", ref_regs, ref_dmem);
  endtask

  initial begin
    logic [31:0] p [];
    int len;
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0;
    // ALU-hazard sequence: add s0,s2,s3; and t0,s0,s1; or t1,s4,s0; sub t2,s0,s5
    p = '{addi_(18, 0, 5), addi_(19, 0, 7), addi_(9, 0, 6), addi_(20, 0, 8), addi_(21, 0, 1),
          add_(8, 18, 19), and_(5, 8, 9), or_(6, 20, 8), sub_(7, 8, 21)};
    run("alu-hazards", p, 100, 9 + 4);
    // Load-hazard sequence: lw s0,40(zero); and t0,s0,s1; or; sub (one stall)
    p = '{addi_(9, 0, 6), addi_(20, 0, 8), addi_(21, 0, 1),
          lw_(8, 40, 0), and_(5, 8, 9), or_(6, 20, 8), sub_(7, 8, 21)};
    run("lw-hazards", p, 100, 7 + 4 + 1);
    // Branch sequence: beq t1,t2,0x40 at 0x20 taken to slt t3,s2,s3 at 0x60
    p = new[26];
    foreach (p[i]) p[i] = nop_();
    p[0] = addi_(6, 0, 3); p[1] = addi_(7, 0, 3); p[2] = addi_(8, 0, 12); p[3] = addi_(9, 0, 6);
    p[4] = addi_(18, 0, 4); p[5] = addi_(19, 0, 9); p[6] = addi_(20, 0, 1);
    p[8]  = beq_(6, 7, 32'h40);
    p[9]  = and_(5, 8, 9);
    p[10] = or_(6, 20, 8);
    p[24] = slt_(28, 18, 19);
    p[25] = beq_(0, 0, 0);
    run("branch-flush", p, 100, 10 + 4 + 1);
    for (int t = 0; t < NPROG; t++) begin
      len = 20 + $urandom % 200;
      p = new[len];
      for (int i = 0; i < len; i++) p[i] = rand_instr(i, len);
      run($sformatf("random%0d", t), p, 8 * len + 50, -1);
    end
    $display("pipeline: fwd_mem=%0d fwd_wb=%0d rf_write_through=%0d fwd_to_branch=%0d lw_stall=%0d branch_stall=%0d flush=%0d; prefetch: discards=%0d",
             n_fwd_mem, n_fwd_wb, n_wt, n_fwd_id, n_lw_stall, n_br_stall, n_flush, n_pf_discard);
    checks += 8;
    if (n_fwd_mem == 0)    begin failures++; $display("FAIL forwarding from MEM never happened"); end
    if (n_fwd_wb == 0)     begin failures++; $display("FAIL forwarding from WB never happened"); end
    if (n_wt == 0)         begin failures++; $display("FAIL register-file write-through never happened"); end
    if (n_fwd_id == 0)     begin failures++; $display("FAIL forwarding into the branch comparator never happened"); end
    if (n_lw_stall == 0)   begin failures++; $display("FAIL load-use stall never happened"); end
    if (n_br_stall == 0)   begin failures++; $display("FAIL branch stall never happened"); end
    if (n_flush == 0)      begin failures++; $display("FAIL taken-branch flush never happened"); end
    if (n_pf_discard == 0) begin failures++; $display("FAIL prefetch discard never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
