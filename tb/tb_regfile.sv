// tb_regfile: self-checking test of the 32 x 8 register file. Checks reset to zero,
// random writes against a reference array, both read ports, and the write-through
// path (reading a register in the cycle it is written returns the new value).
module tb_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [4:0] ra1, ra2, wa;
  logic [7:0] rd1, rd2, wd;
  logic [7:0] model [32];

  regfile #(.NREGS(32), .W(8)) dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 32; i++) begin
      model[i] = 8'h00;
      ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      chk(rd1, 8'h00, "reset rd1"); chk(rd2, 8'h00, "reset rd2");
    end
    repeat (1000) begin
      we = 1'($urandom); wa = 5'($urandom); wd = 8'($urandom);
      ra1 = ($urandom % 4 == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      #1;
      chk(rd1, (we && wa == ra1) ? wd : model[ra1], "rd1");
      chk(rd2, (we && wa == ra2) ? wd : model[ra2], "rd2");
      @(posedge clk); #1;
      if (we) model[wa] = wd;
    end
    we = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); #1; chk(rd1, model[i], "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
