// dmem: the 16K x 8-bit data memory of the Harvard machine.
//
// Single port, used by the MEM stage. A store (we) writes wdata at addr on the rising
// edge. A load (re) reads addr on the rising edge and holds the byte on rdata from
// then on, so a load issued in MEM has its data in WB. The 16K x 8 size is the
// published one; the 14-bit address (the least that reaches 16K) and the synchronous
// read are this design's choices. Contents are not reset.
module dmem #(
  parameter int DEPTH = 16384,
  parameter int W     = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
