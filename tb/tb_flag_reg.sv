// tb_flag_reg: self-checking test of the 4-bit flag register: reset clears it, it
// loads only when we is high and holds otherwise. A shadow copy kept here is the
// reference.
module tb_flag_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [3:0] d, q, shadow;

  flag_reg #(.W(4)) dut (.clk, .rst, .we, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 1; d = 4'hF;
    @(posedge clk); #1;
    checks++; if (q !== 4'h0) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0; shadow = 4'h0;
    repeat (500) begin
      we = 1'($urandom); d = 4'($urandom);
      @(posedge clk); #1;
      if (we) shadow = d;
      checks++;
      if (q !== shadow) begin failures++; $display("FAIL q=%h exp %h", q, shadow); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
