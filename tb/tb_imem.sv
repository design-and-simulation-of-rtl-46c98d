// tb_imem: self-checking test of the 256 x 24 instruction memory. Checks that it
// starts as all zero words, that the load port writes every word, that reads are
// combinational and that a write with we low changes nothing.
module tb_imem;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [7:0] addr, waddr;
  logic [23:0] ins, wdata;

  imem dut (.clk, .addr, .ins, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  function automatic logic [23:0] pat(input int i);
    return 24'(i * 24'h010203 + 24'h5A0000);
  endfunction

  task automatic chk(input logic [23:0] exp, input string what);
    checks++;
    if (ins !== exp) begin failures++; if (failures < 10) $display("FAIL %s addr %0d got %h exp %h", what, addr, ins, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin addr = 8'(i); #1; chk(24'h0, "init"); end
    for (int i = 0; i < 256; i++) begin
      we = 1; waddr = 8'(i); wdata = pat(i);
      @(posedge clk); #1;
    end
    we = 0;
    waddr = 8'd7; wdata = 24'hFFFFFF; @(posedge clk); #1;
    for (int i = 255; i >= 0; i--) begin addr = 8'(i); #1; chk(pat(i), "load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
