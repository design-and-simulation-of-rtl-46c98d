// pcu: program control unit, holding PC, PCR and PCS (each 8 bits).
//
// PC is the address of the next instruction to fetch. Each cycle it advances by one,
// stays (hold: a load-use stall or HLT) or is loaded from target (redirect: a taken
// jump, CALL or RET resolved in EX). Redirect wins over hold.
// PCR and PCS form a two-entry return-address stack: CALL (push) moves PCR into PCS
// and loads PCR with ret_addr; RET (pop) moves PCS back into PCR; the core takes the
// RET target from pcr. A third nested CALL overwrites the oldest entry.
// The three register names and widths are the published ones; their use as a
// return stack is this design's reading of the names. Synchronous reset clears all.
module pcu #(
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          hold,
  input  logic          redirect,
  input  logic [AW-1:0] target,
  input  logic          push,
  input  logic [AW-1:0] ret_addr,
  input  logic          pop,
  output logic [AW-1:0] pc,
  output logic [AW-1:0] pcr,
  output logic [AW-1:0] pcs
);
  always_ff @(posedge clk) begin
    if (rst) begin
      pc  <= '0;
      pcr <= '0;
      pcs <= '0;
    end else begin
      if (redirect)  pc <= target;
      else if (!hold) pc <= pc + 1'b1;
      if (push) begin
        pcs <= pcr;
        pcr <= ret_addr;
      end else if (pop) begin
        pcr <= pcs;
        pcs <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(push && pop))
    else $error("pcu: push and pop in the same cycle");
endmodule
