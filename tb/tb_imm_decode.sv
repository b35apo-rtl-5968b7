// tb_imm_decode: builds random I, S and B immediates, encodes them into
// instruction words field by field as the RV32I formats place them, and
// checks that the decoder recovers the sign-extended value.
module tb_imm_decode;
  import pipe_pkg::*;
  logic [31:0] instr, imm;
  imm_sel_e sel;
  int checks = 0, failures = 0;

  imm_decode dut (.instr, .sel, .imm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ins, input imm_sel_e s, input logic [31:0] expv);
    instr = ins; sel = s;
    #1;
    checks++;
    if (imm !== expv) begin
      failures++;
      $display("FAIL sel=%0d instr=%h imm=%h exp=%h", s, ins, imm, expv);
    end
  endtask

  initial begin
    logic [11:0] v12;
    logic [12:0] v13;
    logic [31:0] filler;
    for (int i = 0; i < 300; i++) begin
      v12 = 12'($urandom);
      v13 = {13'($urandom)} & 13'h1ffe;
      filler = $urandom;
      // I: imm[11:0] in 31:20
      check({v12, filler[19:0]}, IMM_I, 32'(signed'(v12)));
      // S: imm[11:5] in 31:25, imm[4:0] in 11:7
      check({v12[11:5], filler[24:12], v12[4:0], filler[6:0]}, IMM_S, 32'(signed'(v12)));
      // B: imm[12] 31, imm[10:5] 30:25, imm[4:1] 11:8, imm[11] 7
      check({v13[12], v13[10:5], filler[24:12], v13[4:1], v13[11], filler[6:0]}, IMM_B,
            32'(signed'(v13)));
    end
    // fixed examples: addi x21,x21,1365 ; lw x8,40(x0) ; beq x0,x0,-4
    check(32'h555a8a93, IMM_I, 32'd1365);
    check(32'h02802403, IMM_I, 32'd40);
    check(32'hfe000ee3, IMM_B, 32'hffff_fffc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
