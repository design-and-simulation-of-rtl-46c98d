// hazard_unit: data- and control-hazard logic of the five-stage pipeline.
//
// Combinational. Three jobs:
//  * Forwarding. For each EX operand (rs1 -> fwd_a, rs2 -> fwd_b) it selects
//    FWD_EXMEM when the instruction in MEM writes that register and is not a load,
//    else FWD_MEMWB when the instruction in WB writes it, else FWD_NONE (the value
//    read in ID).
//  * Load-use stall. When the instruction in EX is a load whose rd is a source of
//    the instruction in ID, stall is raised for one cycle: PC and IRX hold, a bubble
//    enters ID/EX. The loaded byte then reaches EX by MEM/WB forwarding.
//  * Flush. A taken jump (or HLT) in EX raises flush: IRX and ID/EX are cleared, so a
//    taken jump costs two cycles. Flush masks stall.
// The hazard classes are the published ones; how they are resolved is this
// design's choice.
module hazard_unit
  import risc8_pkg::*;
(
  // instruction in ID
  input  logic id_valid,
  input  reg_t id_rs1,
  input  reg_t id_rs2,
  input  logic id_use_rs1,
  input  logic id_use_rs2,
  // instruction in EX
  input  logic ex_valid,
  input  reg_t ex_rs1,
  input  reg_t ex_rs2,
  input  logic ex_use_rs1,
  input  logic ex_use_rs2,
  input  reg_t ex_rd,
  input  logic ex_mem_re,
  input  logic ex_redirect,   // taken jump or HLT in EX
  // instruction in MEM
  input  logic mem_valid,
  input  reg_t mem_rd,
  input  logic mem_reg_we,
  input  logic mem_mem_re,
  // instruction in WB
  input  logic wb_valid,
  input  reg_t wb_rd,
  input  logic wb_reg_we,
  output logic [1:0] fwd_a,
  output logic [1:0] fwd_b,
  output logic stall,
  output logic flush
);
  localparam logic [1:0] FWD_NONE  = 2'd0;
  localparam logic [1:0] FWD_EXMEM = 2'd1;
  localparam logic [1:0] FWD_MEMWB = 2'd2;

  function automatic logic [1:0] sel(input reg_t r, input logic used);
    if (used && mem_valid && mem_reg_we && !mem_mem_re && mem_rd == r) return FWD_EXMEM;
    if (used && wb_valid && wb_reg_we && wb_rd == r)                  return FWD_MEMWB;
    return FWD_NONE;
  endfunction

  always_comb begin
    fwd_a = ex_valid ? sel(ex_rs1, ex_use_rs1) : FWD_NONE;
    fwd_b = ex_valid ? sel(ex_rs2, ex_use_rs2) : FWD_NONE;
    flush = ex_valid && ex_redirect;
    stall = !flush && id_valid && ex_valid && ex_mem_re &&
            ((id_use_rs1 && id_rs1 == ex_rd) || (id_use_rs2 && id_rs2 == ex_rd));
  end
endmodule
