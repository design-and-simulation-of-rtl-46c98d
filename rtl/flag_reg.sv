// flag_reg: the 4-bit status (flag) register.
//
// Holds {V,N,C,Z}. Loaded on the rising clock edge when we is high, cleared by a
// synchronous reset. The processor writes it at the end of the EX stage, so a jump
// that reaches EX one cycle later already sees the new flags. The 4-bit width is the
// published one; bit order and timing are this design's choice.
module flag_reg #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (we) q <= d;
  end
endmodule
