// tb_instr_mem: loads random words through the load port, then reads every
// address and an out-of-range address (which must return the nop 0x00000013).
module tb_instr_mem;
  localparam int W = 64;
  logic clk = 0, load_we;
  logic [31:0] a, rd, load_addr, load_data;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(W)) dut (.clk, .a, .rd, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0;
    load_we = 1;
    for (int i = 0; i < W; i++) begin
      load_addr = 32'(i * 4); load_data = $urandom; model[i] = load_data;
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int i = 0; i < 300; i++) begin
      a = {24'd0, 6'($urandom), 2'b00};
      load_addr = a; load_data = $urandom;   // not written: load_we low
      #1;
      checks++;
      if (rd !== model[a[7:2]]) begin failures++; $display("FAIL a=%h rd=%h exp=%h", a, rd, model[a[7:2]]); end
      @(posedge clk); #1;
    end
    a = 32'(W * 4); #1;
    checks++;
    if (rd !== 32'h0000_0013) begin failures++; $display("FAIL out-of-range read %h", rd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
