`timescale 1ns/1ps
// tb_v8051_xram: checks the external data memory at its default size (64 KB,
// 16 address lines). Writes a pattern computed from the address to every
// 257th location and to both ends of the space, then 3000 random writes and
// reads against a reference array. Strobes are held for three clocks, as the
// core holds them for one slow clock; read data must be in xm_rd_data at the
// first clock edge and stay there while xm_rd is low.
module tb_v8051_xram;

  logic        clk = 1'b0;
  logic [15:0] addr = '0;
  logic [7:0]  wdata = '0;
  logic        wr = 1'b0, rd = 1'b0;
  logic [7:0]  rdata;

  v8051_xram dut (.clk(clk), .xm_addr(addr), .xm_wr_data(wdata), .xm_wr(wr),
                  .xm_rd(rd), .xm_rd_data(rdata));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic [7:0] ref_mem [int];

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic write(logic [15:0] a, logic [7:0] d);
    @(negedge clk);
    addr = a; wdata = d; wr = 1'b1;
    repeat (3) @(negedge clk);
    wr = 1'b0;
    ref_mem[a] = d;
  endtask

  task automatic read(logic [15:0] a);
    @(negedge clk);
    addr = a; rd = 1'b1;
    @(negedge clk);
    check($sformatf("read %h after one clock", a), rdata, ref_mem[a]);
    repeat (2) @(negedge clk);
    rd = 1'b0;
    addr = ~a;
    repeat (2) @(negedge clk);
    check($sformatf("read %h held", a), rdata, ref_mem[a]);
  endtask

  initial begin
    for (int a = 0; a < 65536; a += 257) write(16'(a), 8'(a ^ (a >> 8) ^ 8'h5A));
    write(16'hFFFF, 8'hC3);
    write(16'h0000, 8'h3C);
    for (int a = 0; a < 65536; a += 257) read(16'(a));
    read(16'hFFFF);
    read(16'h0000);
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] a;
      if (ref_mem.num() > 0 && $urandom_range(0, 1) == 1) begin
        int k;
        k = $urandom_range(0, 255) * 257;
        if (!ref_mem.exists(k)) k = 0;
        a = 16'(k);
        read(a);
      end else begin
        a = 16'($urandom);
        write(a, 8'($urandom));
        read(a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
