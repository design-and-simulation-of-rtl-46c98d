// irx: the instruction register (IF/ID pipeline register).
//
// Captures the 24-bit word fetched from instruction memory, its address and a valid
// bit on each rising edge. stall holds the contents (load-use stall, HLT); flush
// replaces them with an invalid NOP (taken jump). Flush wins over stall. Synchronous
// reset loads an invalid NOP. The register is the IRX of the block diagram; the
// stall/flush behaviour is this design's choice.
module irx
  import risc8_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   stall,
  input  logic   flush,
  input  instr_t ins_in,
  input  iaddr_t pc_in,
  input  logic   valid_in,
  output instr_t ins,
  output iaddr_t pc,
  output logic   valid
);
  always_ff @(posedge clk) begin
    if (rst || flush) begin
      ins   <= '0;
      pc    <= '0;
      valid <= 1'b0;
    end else if (!stall) begin
      ins   <= ins_in;
      pc    <= pc_in;
      valid <= valid_in;
    end
  end
endmodule
