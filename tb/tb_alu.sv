// tb_alu: self-checking test of the ALU. Random and corner operands are
// applied for every operation; results are compared with a reference
// computed in the testbench from SystemVerilog operators.
module tb_alu;
  import pipe_pkg::*;
  logic [31:0] a, b, y, exp_y;
  alu_op_e op;
  logic zero;
  int checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.a, .b, .op, .y, .zero);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, tb_, input alu_op_e top);
    a = ta; b = tb_; op = top;
    #1;
    case (top)
      ALU_ADD: exp_y = ta + tb_;
      ALU_SUB: exp_y = ta - tb_;
      ALU_AND: exp_y = ta & tb_;
      ALU_OR:  exp_y = ta | tb_;
      ALU_SLT: exp_y = (int'(ta) < int'(tb_)) ? 32'd1 : 32'd0;
      default: exp_y = 'x;
    endcase
    checks++;
    if (y !== exp_y || zero !== (exp_y == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h zero=%b", top, ta, tb_, y, exp_y, zero);
    end
  endtask

  initial begin
    alu_op_e ops [5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};
    for (int k = 0; k < 5; k++) begin
      check(32'h0, 32'h0, ops[k]);
      check(32'h7fff_ffff, 32'h8000_0000, ops[k]);
      check(32'h8000_0000, 32'h7fff_ffff, ops[k]);
      check(32'hffff_ffff, 32'h1, ops[k]);
      check(32'h5, 32'h5, ops[k]);
      for (int i = 0; i < 200; i++) check($urandom, $urandom, ops[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
