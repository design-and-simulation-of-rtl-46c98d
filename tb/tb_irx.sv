// tb_irx: self-checking test of the IRX (IF/ID) register: reset gives an invalid
// zero word, stall holds, flush clears and wins over stall, otherwise the inputs are
// captured on the clock edge.
module tb_irx;
  import risc8_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, stall, flush, valid_in, valid;
  instr_t ins_in, ins;
  iaddr_t pc_in, pc;
  instr_t m_ins; iaddr_t m_pc; logic m_v;

  irx dut (.clk, .rst, .stall, .flush, .ins_in, .pc_in, .valid_in, .ins, .pc, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; stall = 0; flush = 0; ins_in = 24'hABCDEF; pc_in = 8'h12; valid_in = 1;
    @(posedge clk); #1;
    rst = 0; m_ins = 0; m_pc = 0; m_v = 0;
    repeat (2000) begin
      checks++;
      if (ins !== m_ins || pc !== m_pc || valid !== m_v) begin
        failures++;
        if (failures < 10) $display("FAIL ins=%h/%h pc=%h/%h v=%b/%b", ins, m_ins, pc, m_pc, valid, m_v);
      end
      stall = ($urandom % 3 == 0); flush = ($urandom % 5 == 0);
      ins_in = 24'($urandom); pc_in = 8'($urandom); valid_in = 1'($urandom);
      @(posedge clk); #1;
      if (flush) begin m_ins = 0; m_pc = 0; m_v = 0; end
      else if (!stall) begin m_ins = ins_in; m_pc = pc_in; m_v = valid_in; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
