`timescale 1ns/1ps
// tb_v8051_full: runs the complete v8051_system with every parameter at its
// default, so the ROM holds the built-in test program (rtl/v8051_rom_init.hex):
//   MOV B,#12h; MOV A,#3Ah; MOV R5,#04h;
//   loop: RLC A; MOV P0,A; XCH A,B; RRC A; MOV P1,A; XCH A,B; DJNZ R5,loop;
//   SJMP 0
// Expected port values, worked out by hand from the 8051 semantics: P0 shows
// 74h, E8h, D1h, A2h and P1 shows 09h, 04h, 82h, C1h, and the sequence
// repeats after the SJMP. Also checks the reset sequence (ports FFh) and the
// instruction time: 17 slow clocks = 51 clkfast periods per instruction, so
// seven instructions (357 clkfast) between successive P0 updates in the loop.
module tb_v8051_full;
  import v8051_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] p0_out, p1_out, p2_out, p3_out;
  cpu_state_e cpu_state;
  exe_state_e exe_state;

  int checks = 0;
  int failures = 0;
  longint cyc = 0;

  v8051_system dut (
    .clkfast (clk),
    .rst     (rst),
    .p0_in   (8'h00),
    .p1_in   (8'h00),
    .p2_in   (8'h00),
    .p3_in   (8'h00),
    .p0_out  (p0_out),
    .p1_out  (p1_out),
    .p2_out  (p2_out),
    .p3_out  (p3_out),
    .cpu_state (cpu_state),
    .exe_state (exe_state)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [7:0] exp_p0 [4] = '{8'h74, 8'hE8, 8'hD1, 8'hA2};
  logic [7:0] exp_p1 [4] = '{8'h09, 8'h04, 8'h82, 8'hC1};

  initial begin
    logic [7:0] last0, last1;
    longint t_prev;
    int n0, n1;
    rst = 1'b1;
    repeat (10) @(posedge clk);
    rst = 1'b0;
    // reset sequence: 6 slow clocks, ports to FFh
    repeat (40) @(posedge clk);
    check("P0 after reset", p0_out, 8'hFF);
    check("P1 after reset", p1_out, 8'hFF);
    check("P2 after reset", p2_out, 8'hFF);
    check("P3 after reset", p3_out, 8'hFF);
    last0 = p0_out; last1 = p1_out; n0 = 0; n1 = 0; t_prev = 0;
    // two full passes of the loop: 8 updates on each port
    while (n0 < 8 || n1 < 8) begin
      @(posedge clk);
      if (p0_out != last0) begin
        check($sformatf("P0 value %0d", n0), p0_out, exp_p0[n0 % 4]);
        if (n0 % 4 != 0) check($sformatf("P0 period %0d", n0), 32'(cyc - t_prev), 32'd357);
        t_prev = cyc;
        last0 = p0_out;
        n0++;
      end
      if (p1_out != last1) begin
        check($sformatf("P1 value %0d", n1), p1_out, exp_p1[n1 % 4]);
        last1 = p1_out;
        n1++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
