`timescale 1ns/1ps
// tb_v8051_rom: checks the program memory at its default size (4 KB) with its
// default contents, the built-in 23-byte test program, whose bytes are
// written out below from its assembly listing. Each read presents an address
// right after an enabled (ce) clock, as the controller does, and expects the
// byte in rom_data after the next enabled clock, three fast clocks later: one
// slow clock of latency. Also checks that every word past the program reads
// 00h, that rom_data holds when rom_rd is low, and that an address presented
// only one fast clock before the enabled edge is not yet seen (the memory
// needs the address held for three fast clocks).
module tb_v8051_rom;

  logic        clk = 1'b0;
  logic        ce = 1'b0;
  logic        rd = 1'b0;
  logic [11:0] addr = '0;
  logic [7:0]  data;

  v8051_rom dut (.clk(clk), .ce(ce), .rom_rd(rd), .rom_addr(addr), .rom_data(data));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // MOV B,#12h; MOV A,#3Ah; MOV R5,#4; RLC A; MOV P0,A; XCH A,B; RRC A;
  // MOV P1,A; XCH A,B; DJNZ R5,-12; SJMP -21; NOP; NOP
  logic [7:0] prog [23] = '{8'h75, 8'hF0, 8'h12, 8'h74, 8'h3A, 8'h7D, 8'h04, 8'h33,
                            8'hF5, 8'h80, 8'hC5, 8'hF0, 8'h13, 8'hF5, 8'h90, 8'hC5,
                            8'hF0, 8'hDD, 8'hF4, 8'h80, 8'hEB, 8'h00, 8'h00};

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Present address a, with r as rom_rd, for one slow clock (three fast ones).
  task automatic slow_read(logic [11:0] a, logic r);
    @(negedge clk);
    addr = a; rd = r;
    repeat (2) @(negedge clk);
    ce = 1'b1;
    @(negedge clk);
    ce = 1'b0;
  endtask

  initial begin
    logic [7:0] held;
    for (int i = 0; i < 4096; i++) begin
      slow_read(12'(i), 1'b1);
      check($sformatf("rom[%0h]", i), data, (i < 23) ? prog[i] : 8'h00);
    end
    slow_read(12'd0, 1'b1);
    held = data;
    slow_read(12'd1, 1'b0);
    check("held while rom_rd low", data, held);
    // address changed one fast clock before the enabled edge: old data
    @(negedge clk);
    addr = 12'd3; rd = 1'b1;
    repeat (2) @(negedge clk);
    addr = 12'd7;
    ce = 1'b1;
    @(negedge clk);
    ce = 1'b0;
    check("address held too briefly", data, prog[3]);
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
