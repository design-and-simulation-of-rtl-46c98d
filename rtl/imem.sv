// imem: the 256 x 24-bit instruction memory.
//
// Read combinationally at the PC during IF; the IRX register captures the word.
// During normal running it is read-only. A write port (we, waddr, wdata) loads the
// program, normally while the processor is held in reset. The 256 x 24 size is the
// published one; the load port and asynchronous read are this design's choices.
// The memory starts as all NOP (zero) words.
module imem #(
  parameter int DEPTH = 256,
  parameter int W     = 24,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  ins,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign ins = mem[addr];
endmodule
