// regfile: 32 general-purpose registers of 8 bits.
//
// Two combinational read ports (ID stage) and one synchronous write port (WB stage).
// A read of the register being written in the same cycle returns the new value
// (write-through), so write-back and decode can share a cycle without a hazard.
// Synchronous reset clears all registers. Size is the published 32 x 8; the port
// count, write-through and reset are this design's choices.
module regfile #(
  parameter int NREGS = 32,
  parameter int W     = 8,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (we && wa == ra2) ? wd : regs[ra2];
  end
endmodule
