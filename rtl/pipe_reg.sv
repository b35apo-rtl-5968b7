// pipe_reg: an interstage (pipeline) register with hold and flush.
// On each rising clock edge it loads `d` unless `en` is low, which holds the
// stored value (a stall). A high `clr` loads `CLR_VALUE` instead, turning the
// stage into a bubble (a flush); `clr` wins over `en`. Reset loads
// `CLR_VALUE` too. The hold and the bubble are the two controls the lecture
// adds to every interstage register to stall and to discard instructions;
// the priority of clear over hold is this design's own choice.
module pipe_reg #(
  parameter type         T         = logic [31:0],
  parameter T            CLR_VALUE = '0
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic clr,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst || clr) q <= CLR_VALUE;
    else if (en)    q <= d;
  end

endmodule
