// tb_dmem: self-checking test of the 16K x 8 data memory at its full size. Writes
// every address with a value derived from the address, reads all back (one cycle of
// read latency), then mixes random reads and writes against a reference array.
module tb_dmem;
  int checks = 0, failures = 0;
  logic clk = 0, we, re;
  logic [13:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [16384];

  dmem dut (.clk, .we, .re, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  function automatic logic [7:0] pat(input int i);
    return 8'((i * 37) ^ (i >> 6));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 16384; i++) begin
      we = 1; addr = 14'(i); wdata = pat(i); model[i] = pat(i);
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 16384; i++) begin
      re = 1; addr = 14'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; if (failures < 10) $display("FAIL addr %0d got %h exp %h", i, rdata, model[i]); end
    end
    repeat (3000) begin
      we = 1'($urandom); re = !we; addr = 14'($urandom); wdata = 8'($urandom);
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
      else begin
        checks++;
        if (rdata !== model[addr]) begin failures++; if (failures < 10) $display("FAIL rnd addr %0d got %h exp %h", addr, rdata, model[addr]); end
      end
    end
    // rdata holds while re is low
    re = 1; we = 0; addr = 14'd5; @(posedge clk); #1;
    re = 0; addr = 14'd6; @(posedge clk); #1;
    checks++; if (rdata !== model[5]) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
