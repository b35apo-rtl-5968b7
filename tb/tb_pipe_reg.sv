// tb_pipe_reg: drives random data with random enable and clear and checks
// each cycle against a one-register reference: clear loads the bubble value,
// a low enable holds, otherwise the input is captured.
module tb_pipe_reg;
  typedef struct packed { logic v; logic [15:0] x; } item_t;
  localparam item_t BUB = '{v: 1'b0, x: 16'hdead};
  logic clk = 0, rst, en, clr;
  item_t d, q, model;
  int checks = 0, failures = 0, holds = 0, clears = 0;

  pipe_reg #(.T(item_t), .CLR_VALUE(BUB)) dut (.clk, .rst, .en, .clr, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; clr = 0; d = '0;
    @(posedge clk); #1;
    checks++; if (q !== BUB) begin failures++; $display("FAIL reset value %h", q); end
    rst = 0; model = BUB;
    for (int i = 0; i < 1000; i++) begin
      en = ($urandom % 4) != 0;
      clr = ($urandom % 8) == 0;
      d = '{v: 1'b1, x: 16'($urandom)};
      @(posedge clk);
      if (clr) begin model = BUB; clears++; end
      else if (en) model = d;
      else holds++;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d q=%h exp=%h", i, q, model); end
    end
    checks++;
    if (holds == 0 || clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
