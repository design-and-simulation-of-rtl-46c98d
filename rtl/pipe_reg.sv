// pipe_reg: a generic pipeline register between two stages (ID/EX, EX/MEM, MEM/WB).
//
// Holds a value of type T. On each rising edge it loads d, keeps its value when
// stall is high, or loads the all-zero value when rst or flush is high (flush wins).
// Every stage struct of the processor has its valid bit inside, so all-zero is a
// bubble. The type parameter is this design's choice.
module pipe_reg #(
  parameter type T = logic [7:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic flush,
  input  T     d,
  output T     q
);
  always_ff @(posedge clk) begin
    if (rst || flush) q <= '0;
    else if (!stall)  q <= d;
  end
endmodule
