`timescale 1ns/1ps
// tb_v8051_clkdiv: checks the slow-clock enable generator at its default
// division by three: ce stays low during reset, comes DIV-1 fast clocks after
// reset is released, and then is high for exactly one fast clock in every
// three, for 3000 fast clocks. A second instance with DIV = 5 checks that the
// parameter works.
module tb_v8051_clkdiv;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce3, ce5;

  v8051_clkdiv dut (.clk(clk), .rst(rst), .ce(ce3));
  v8051_clkdiv #(.DIV(5)) dut5 (.clk(clk), .rst(rst), .ce(ce5));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #1;
    check("ce low in reset", ce3, 0);
    check("ce5 low in reset", ce5, 0);
    @(negedge clk);
    rst = 1'b0;
    for (int n = 1; n <= 3000; n++) begin
      @(posedge clk);
      #1;
      check($sformatf("ce at fast clock %0d", n), ce3, (n % 3) == 2);
      check($sformatf("ce5 at fast clock %0d", n), ce5, (n % 5) == 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
