// tb_riscv_pipeline: runs the core against instruction and data memory
// arrays held in the testbench. Three short programs exercise forwarding
// from MEM and WB, the register-file write-through, the load-use stall,
// store-data forwarding, the branch stalls and the taken-branch flush. Each
// program's final registers and memory are compared with the instruction-
// level reference model, and the cycle of the last retirement with the
// pipeline's timing: N instructions finish after N + 4 cycles plus one cycle
// per stall or flush.
module tb_riscv_pipeline;
  import pipe_pkg::*;
  import rv_asm_pkg::*;

  localparam int DW = 64;
  logic clk = 0, rst;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic dmem_we, retire;
  logic [31:0] imem [64];
  logic [31:0] dmem [DW];
  int checks = 0, failures = 0;

  riscv_pipeline dut (.clk, .rst, .imem_addr, .imem_rdata, .dmem_addr, .dmem_wdata, .dmem_we,
                      .dmem_rdata, .retire);

  always #5 clk = ~clk;
  assign imem_rdata = imem[imem_addr[7:2]];
  assign dmem_rdata = dmem[dmem_addr[7:2]];
  always_ff @(posedge clk) if (dmem_we) dmem[dmem_addr[7:2]] <= dmem_wdata;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input string nm, input logic [31:0] prog [], input int exp_cycles);
    logic [31:0] ref_regs [32];
    logic [31:0] ref_dmem [];
    int n, cyc, retired, last;
    ref_dmem = new[DW];
    foreach (imem[i]) imem[i] = (i < prog.size()) ? prog[i] : beq_(0, 0, 0);
    foreach (dmem[i]) begin dmem[i] = $urandom; ref_dmem[i] = dmem[i]; end
    dmem[10] = 32'h5555_5555; ref_dmem[10] = dmem[10];
    foreach (ref_regs[i]) ref_regs[i] = 0;
    n = iss_run(imem, ref_regs, ref_dmem, 1000);
    rst = 1;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    cyc = 0; retired = 0; last = -1;
    while (cyc < 200) begin
      @(posedge clk);
      cyc++;
      if (retire) begin
        retired++;
        if (retired == n) last = cyc;
      end
    end
    checks++;
    if (last != exp_cycles) begin
      failures++;
      $display("FAIL %s: %0d instructions done after %0d cycles, expected %0d", nm, n, last, exp_cycles);
    end
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (dut.u_rf.regs[r] !== ref_regs[r]) begin
        failures++;
        $display("FAIL %s: x%0d = %h, expected %h", nm, r, dut.u_rf.regs[r], ref_regs[r]);
      end
    end
    for (int i = 0; i < DW; i++) begin
      checks++;
      if (dmem[i] !== ref_dmem[i]) begin
        failures++;
        $display("FAIL %s: mem[%0d] = %h, expected %h", nm, i, dmem[i], ref_dmem[i]);
      end
    end
  endtask

  initial begin
    logic [31:0] p [];
    // ALU hazards: every source resolved by forwarding or write-through, no stall.
    p = '{addi_(18, 0, 5), addi_(19, 0, 7), addi_(9, 0, 6), addi_(20, 0, 8), addi_(21, 0, 1),
          add_(8, 18, 19),   // add s0, s2, s3
          and_(5, 8, 9),     // and t0, s0, s1  (s0 from MEM)
          or_(6, 20, 8),     // or  t1, s4, s0  (s0 from WB)
          sub_(7, 8, 21),    // sub t2, s0, s5  (s0 through the register file)
          slt_(28, 21, 8), slt_(29, 8, 21)};
    run("alu-hazards", p, 11 + 4);
    // Load hazards: load-use stall for an ALU user and for store data.
    p = '{addi_(9, 0, 6), addi_(20, 0, 8), addi_(21, 0, 1),
          lw_(8, 40, 0),     // lw  s0, 40(zero)
          and_(5, 8, 9),     // and t0, s0, s1  (one stall)
          or_(6, 20, 8), sub_(7, 8, 21),
          sw_(7, 44, 0),     // store data forwarded from MEM
          lw_(10, 44, 0),
          sw_(10, 48, 0)};   // load-use stall for store data
    run("lw-hazards", p, 10 + 4 + 2);
    // Branches: stall on an operand computed in EX, forward from MEM,
    // taken-branch flush, two-cycle stall behind a load, not-taken branch.
    p = '{addi_(10, 0, 1), addi_(11, 0, 1),
          beq_(10, 11, 12),  // stall 1, taken, flush 1
          addi_(12, 0, 99), addi_(13, 0, 99),
          lw_(14, 40, 0),
          beq_(14, 0, 8),    // stall 2, not taken
          addi_(15, 0, 5),
          beq_(0, 0, 8),     // taken, flush 1
          addi_(16, 0, 99),
          addi_(17, 0, 7)};
    run("branches", p, 8 + 4 + 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
