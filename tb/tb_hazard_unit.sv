// tb_hazard_unit: self-checking test of the hazard unit. Drives random pipeline
// contents (register numbers drawn from a small set so matches are frequent) and
// compares forwarding selects, stall and flush with the rules written out here.
module tb_hazard_unit;
  import risc8_pkg::*;
  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd1 = 0, n_fwd2 = 0, n_flush = 0;
  logic id_valid, id_use_rs1, id_use_rs2, ex_valid, ex_use_rs1, ex_use_rs2, ex_mem_re, ex_redirect;
  logic mem_valid, mem_reg_we, mem_mem_re, wb_valid, wb_reg_we;
  reg_t id_rs1, id_rs2, ex_rs1, ex_rs2, ex_rd, mem_rd, wb_rd;
  logic [1:0] fwd_a, fwd_b;
  logic stall, flush;

  hazard_unit dut (.*);

  function automatic logic [1:0] exp_fwd(input reg_t r, input logic used);
    if (!ex_valid || !used) return 2'd0;
    if (mem_valid && mem_reg_we && !mem_mem_re && mem_rd == r) return 2'd1;
    if (wb_valid && wb_reg_we && wb_rd == r) return 2'd2;
    return 2'd0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_flush, e_stall;
    repeat (20000) begin
      {id_valid, id_use_rs1, id_use_rs2, ex_valid, ex_use_rs1, ex_use_rs2, ex_mem_re} = 7'($urandom);
      ex_redirect = ($urandom % 4 == 0);
      {mem_valid, mem_reg_we, mem_mem_re, wb_valid, wb_reg_we} = 5'($urandom);
      id_rs1 = 5'($urandom % 4); id_rs2 = 5'($urandom % 4); ex_rs1 = 5'($urandom % 4);
      ex_rs2 = 5'($urandom % 4); ex_rd = 5'($urandom % 4); mem_rd = 5'($urandom % 4); wb_rd = 5'($urandom % 4);
      #1;
      e_flush = ex_valid && ex_redirect;
      e_stall = !e_flush && id_valid && ex_valid && ex_mem_re &&
                ((id_use_rs1 && id_rs1 == ex_rd) || (id_use_rs2 && id_rs2 == ex_rd));
      checks++;
      if (fwd_a !== exp_fwd(ex_rs1, ex_use_rs1) || fwd_b !== exp_fwd(ex_rs2, ex_use_rs2) ||
          stall !== e_stall || flush !== e_flush) begin
        failures++;
        if (failures < 10) $display("FAIL fa=%0d fb=%0d st=%b fl=%b", fwd_a, fwd_b, stall, flush);
      end
      n_stall += int'(stall); n_flush += int'(flush);
      n_fwd1 += int'(fwd_a == 2'd1); n_fwd2 += int'(fwd_a == 2'd2);
    end
    checks++;
    if (n_stall == 0 || n_flush == 0 || n_fwd1 == 0 || n_fwd2 == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
