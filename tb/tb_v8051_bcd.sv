`timescale 1ns/1ps
// tb_v8051_bcd: runs the BCD count-down demo (tb/tb_v8051_bcd.hex) on the
// complete system at its default sizes. The program builds a 7-segment code
// table and a table of the decimal weights of the eight bits in internal
// RAM, shows 000 on P2/P1/P0, waits for the start pin P2.7, reads P0 as a
// binary byte and converts it to BCD bit by bit (ADD, DA, carry into a
// hundreds digit), then counts the decimal value down to 001, showing the
// hundreds, tens and units digit codes on P2, P1 and P0 and the packed BCD
// value on P3, calling a delay subroutine between steps, and then starts over
// by reading P0 again.
// With P0 pins = 18h the expected display is 024, 023, ... 001 (7-segment
// codes 0:40h 1:79h 2:24h 3:30h 4:1Bh 5:12h 6:02h 7:78h 8:00h 9:10h) and then
// 024 again. The testbench records P0/P1/P2 each time the program writes P2
// and compares the sequence; it also checks that nothing is shown before the
// start pin is set. A second run of the conversion with P0 pins = 9Ch (156)
// checks the hundreds digit.
module tb_v8051_bcd;
  import v8051_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [7:0] p0_in = 8'h18, p2_in = 8'h00;
  logic [7:0] p0_out, p1_out, p2_out, p3_out;
  cpu_state_e cs;
  exe_state_e es;

  v8051_system #(.ROM_FILE("tb/tb_v8051_bcd.hex")) dut (
    .clkfast(clk), .rst(rst),
    .p0_in(p0_in), .p1_in(8'h00), .p2_in(p2_in), .p3_in(8'h00),
    .p0_out(p0_out), .p1_out(p1_out), .p2_out(p2_out), .p3_out(p3_out),
    .cpu_state(cs), .exe_state(es));

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

  logic [7:0] seg [10] = '{8'h40, 8'h79, 8'h24, 8'h30, 8'h1B, 8'h12, 8'h02, 8'h78, 8'h00, 8'h10};

  // displays: one entry per write of P2 (the last digit the program writes)
  logic [23:0] shown [$];
  logic        p2_wr_d = 1'b0;
  always @(posedge clk) begin
    p2_wr_d <= dut.u_core.ce && dut.u_core.ram_wr && !dut.u_core.ram_is_bit &&
               dut.u_core.ram_addr == 8'hA0 && cs == CS_3;
    if (p2_wr_d) shown.push_back({p2_out, p1_out, p0_out});
  end

  function automatic logic [23:0] code(int v);
    return {seg[v / 100], seg[(v / 10) % 10], seg[v % 10]};
  endfunction

  initial begin
    int n;
    repeat (10) @(posedge clk);
    rst = 1'b0;
    repeat (30000) @(posedge clk);
    check("displays before start", shown.size(), 1);
    if (shown.size() > 0) check("initial display 000", shown[0], code(0));
    // start: 24 count-down steps, then the program reads P0 again
    p2_in = 8'h80;
    wait (shown.size() == 1 + 24 + 2);
    for (int i = 0; i < 24; i++)
      check($sformatf("display %0d", 24 - i), shown[1 + i], code(24 - i));
    check("restart 024", shown[25], code(24));
    check("restart 023", shown[26], code(23));
    check("P3 shows packed BCD", p3_out, 8'h23);
    // second input value: 9Ch = 156
    wait (shown.size() == 1 + 24 + 24);   // finish the second count-down
    p0_in = 8'h9C;
    wait (shown.size() == 1 + 48 + 2);
    check("conversion of 9Ch", shown[49], code(156));
    check("next step 155", shown[50], code(155));
    $display("displays seen: %0d", shown.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired, displays seen: %0d", shown.size());
    foreach (shown[i]) $display("  %0d: %h", i, shown[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
