// tb_pcu: self-checking test of the program control unit. Drives random hold,
// redirect, push (CALL) and pop (RET) and compares PC, PCR and PCS with a reference
// model of an incrementing PC and a two-entry return stack.
module tb_pcu;
  int checks = 0, failures = 0;
  logic clk = 0, rst, hold, redirect, push, pop;
  logic [7:0] target, ret_addr, pc, pcr, pcs;
  logic [7:0] m_pc, m_pcr, m_pcs;

  pcu #(.AW(8)) dut (.clk, .rst, .hold, .redirect, .target, .push, .ret_addr, .pop, .pc, .pcr, .pcs);

  always #5 clk = ~clk;

  task automatic chk;
    checks++;
    if (pc !== m_pc || pcr !== m_pcr || pcs !== m_pcs) begin
      failures++;
      if (failures < 10) $display("FAIL pc=%h/%h pcr=%h/%h pcs=%h/%h", pc, m_pc, pcr, m_pcr, pcs, m_pcs);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; hold = 0; redirect = 0; push = 0; pop = 0; target = 0; ret_addr = 0;
    @(posedge clk); #1;
    rst = 0; m_pc = 0; m_pcr = 0; m_pcs = 0;
    chk();
    // plain sequential run: 300 increments wrap past 255
    repeat (300) begin @(posedge clk); #1; m_pc = m_pc + 1; chk(); end
    repeat (2000) begin
      hold = ($urandom % 4 == 0);
      redirect = ($urandom % 5 == 0);
      target = 8'($urandom);
      case ($urandom % 6)
        0: begin push = 1; pop = 0; end
        1: begin push = 0; pop = 1; end
        default: begin push = 0; pop = 0; end
      endcase
      ret_addr = 8'($urandom);
      @(posedge clk); #1;
      if (redirect) m_pc = target; else if (!hold) m_pc = m_pc + 1;
      if (push) begin m_pcs = m_pcr; m_pcr = ret_addr; end
      else if (pop) begin m_pcr = m_pcs; m_pcs = 0; end
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
