// tb_regfile: random writes and reads against a reference array. Checks that
// x0 stays zero, that a write is seen by reads in later cycles, and that a
// read of the register being written in the same cycle returns the new value
// (write before read within a cycle). A second instance built without the
// write-through must return the old value in that case.
module tb_regfile;
  logic clk = 0, rst;
  logic [4:0] a1, a2, a3;
  logic [31:0] rd1, rd2, wd3, p_rd1, p_rd2;
  logic we3;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile #(.WIDTH(32), .DEPTH(32)) dut (.clk, .rst, .a1, .a2, .rd1, .rd2, .we3, .a3, .wd3);

  regfile #(.WIDTH(32), .DEPTH(32), .WRITE_THROUGH(1'b0)) dut_plain (
    .clk, .rst, .a1, .a2, .rd1(p_rd1), .rd2(p_rd2), .we3, .a3, .wd3);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_rd(input logic [4:0] a);
    if (a == 0) return 0;
    if (we3 && a == a3) return wd3;
    return model[a];
  endfunction

  initial begin
    rst = 1; we3 = 0; a1 = 0; a2 = 0; a3 = 0; wd3 = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      we3 = 1'($urandom);
      a3 = 5'($urandom);
      wd3 = $urandom;
      a1 = (i % 4 == 0) ? a3 : 5'($urandom);
      a2 = (i % 7 == 0) ? 5'd0 : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== expect_rd(a1)) begin failures++; $display("FAIL rd1 a1=%0d %h exp %h", a1, rd1, expect_rd(a1)); end
      if (rd2 !== expect_rd(a2)) begin failures++; $display("FAIL rd2 a2=%0d %h exp %h", a2, rd2, expect_rd(a2)); end
      checks += 2;
      if (p_rd1 !== (a1 == 0 ? 32'd0 : model[a1])) begin failures++; $display("FAIL plain rd1 a1=%0d", a1); end
      if (p_rd2 !== (a2 == 0 ? 32'd0 : model[a2])) begin failures++; $display("FAIL plain rd2 a2=%0d", a2); end
      @(posedge clk);
      if (we3 && a3 != 0) model[a3] = wd3;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
