// alu: the 8-bit arithmetic logic unit of the EX stage.
//
// Combinational. Performs ADD, SUB, AND, OR, XOR and a pass-through of operand B
// (used by MOVI). Compare is SUB with the result discarded by the control word.
// Flags out are {V,N,C,Z}: Z = result zero, N = result bit 7, C = carry out of ADD or
// borrow of SUB (1 when a < b unsigned), V = signed overflow. Logic ops and PASSB clear
// C and V. The operation set follows the published one; the flag rules are this
// design's choice.
module alu
  import risc8_pkg::*;
#(
  parameter int W = XLEN
) (
  input  alu_op_t      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output flags_t       flags
);
  logic [W:0] sum;   // one extra bit for the carry/borrow
  logic       c, v;

  always_comb begin
    sum = '0;
    c   = 1'b0;
    v   = 1'b0;
    unique case (op)
      ALU_ADD: begin
        sum = {1'b0, a} + {1'b0, b};
        c   = sum[W];
        v   = (a[W-1] == b[W-1]) && (sum[W-1] != a[W-1]);
      end
      ALU_SUB: begin
        sum = {1'b0, a} - {1'b0, b};
        c   = sum[W];  // borrow
        v   = (a[W-1] != b[W-1]) && (sum[W-1] != a[W-1]);
      end
      ALU_AND:   sum = {1'b0, a & b};
      ALU_OR:    sum = {1'b0, a | b};
      ALU_XOR:   sum = {1'b0, a ^ b};
      ALU_PASSB: sum = {1'b0, b};
      default:   sum = '0;
    endcase
    y        = sum[W-1:0];
    flags    = '0;
    flags[FZ] = (y == '0);
    flags[FN] = y[W-1];
    flags[FC] = c;
    flags[FV] = v;
  end
endmodule
