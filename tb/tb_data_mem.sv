// tb_data_mem: writes random words at random addresses and reads them back
// against a reference array; checks that a read is combinational and that
// a write appears only after the clock edge.
module tb_data_mem;
  localparam int W = 64;
  logic clk = 0, we;
  logic [31:0] a, wd, rd;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(W)) dut (.clk, .we, .a, .wd, .rd);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1; 
    for (int i = 0; i < W; i++) begin
      a = 32'(i * 4); wd = $urandom; model[i] = wd;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom);
      a = {24'd0, 6'($urandom), 2'($urandom)};
      wd = $urandom;
      #1;
      checks++;
      if (rd !== model[a[7:2]]) begin failures++; $display("FAIL read a=%h rd=%h exp=%h", a, rd, model[a[7:2]]); end
      @(posedge clk);
      if (we) model[a[7:2]] = wd;
      #1;
      checks++;
      if (rd !== model[a[7:2]]) begin failures++; $display("FAIL after write a=%h rd=%h exp=%h", a, rd, model[a[7:2]]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
