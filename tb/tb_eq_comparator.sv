// tb_eq_comparator: checks the branch equality comparator on equal operands,
// operands differing in one bit, and random operands.
module tb_eq_comparator;
  logic [31:0] a, b;
  logic eq;
  int checks = 0, failures = 0;

  eq_comparator #(.WIDTH(32)) dut (.a, .b, .eq);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, tb_);
    a = ta; b = tb_;
    #1;
    checks++;
    if (eq !== (ta == tb_)) begin
      failures++;
      $display("FAIL a=%h b=%h eq=%b", ta, tb_, eq);
    end
  endtask

  initial begin
    logic [31:0] r;
    for (int i = 0; i < 100; i++) begin
      r = $urandom;
      check(r, r);
      check(r, r ^ (32'h1 << (i % 32)));
      check(r, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
