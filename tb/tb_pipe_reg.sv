// tb_pipe_reg: self-checking test of the generic pipeline register, instantiated with
// the processor's EX/MEM struct: reset and flush load a bubble (all zero), stall
// holds, otherwise d is captured.
module tb_pipe_reg;
  import risc8_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, stall, flush;
  exmem_t d, q, m;

  pipe_reg #(.T(exmem_t)) dut (.clk, .rst, .stall, .flush, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; stall = 0; flush = 0; d = '1;
    @(posedge clk); #1;
    rst = 0; m = '0;
    repeat (2000) begin
      checks++;
      if (q !== m) begin failures++; if (failures < 10) $display("FAIL q=%h exp %h", q, m); end
      stall = ($urandom % 3 == 0); flush = ($urandom % 6 == 0);
      d = exmem_t'($bits(exmem_t)'({$urandom, $urandom}));
      @(posedge clk); #1;
      if (flush) m = '0; else if (!stall) m = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
