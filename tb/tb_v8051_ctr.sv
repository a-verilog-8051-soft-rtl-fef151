`timescale 1ns/1ps
// tb_v8051_ctr: tests the controller by letting it run a 548-byte program
// (tb/tb_v8051_ctr_prog.hex) that uses every instruction group of the 8051:
// arithmetic with flags, MUL/DIV/DA, logic on A and on direct bytes, rotates,
// bit operations and Boolean carry logic, every conditional and unconditional
// jump form, calls and returns, PUSH/POP, MOVX in both address forms, MOVC in
// both forms, XCH/XCHD, register-bank switching, port input. The program
// stores its results in internal RAM; the expected bytes below were worked
// out by hand from the 8051 instruction definitions. A wrong path through a
// branch writes a marker to 4Fh, which must stay 00h.
// The controller runs with the real decoder, ALU, internal RAM and external
// RAM; the ROM and the one-in-three clock enable are modelled here.
// Also checks the state sequencing: six slow clocks in CS_0, one in CS_1,
// eight each in CS_2 and CS_3, one-hot codes, 17 slow clocks per instruction.
module tb_v8051_ctr;
  import v8051_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce  = 1'b0;
  int   div = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
    ce  <= (div == 1);
  end

  // ROM model: registered read on the slow clock
  logic [7:0]  prog [4096];
  logic [11:0] rom_addr;
  logic        rom_rd;
  logic [7:0]  rom_data;
  initial begin
    for (int i = 0; i < 4096; i++) prog[i] = 8'h00;
    $readmemh("tb/tb_v8051_ctr_prog.hex", prog);
  end
  always @(posedge clk) if (ce && rom_rd) rom_data <= prog[rom_addr];

  logic [7:0]  ram_addr, ram_wr_data, ram_rd_data;
  logic        ram_wr_bit, ram_rd, ram_wr, ram_is_bit, ram_rd_bit;
  logic [7:0]  dec_op_out;
  dec_t        dec_op_in;
  alu_op_e     alu_op;
  logic [7:0]  s1, s2, s3, d1, d2;
  logic        scy, sac, dcy, dac, dov;
  logic [15:0] xm_addr;
  logic [7:0]  xm_wr_data, xm_rd_data;
  logic        xm_wr, xm_rd;
  logic [7:0]  p0, p1, p2, p3;
  cpu_state_e  cs;
  exe_state_e  es;

  v8051_ctr dut (
    .clk(clk), .ce(ce), .rst(rst),
    .rom_addr(rom_addr), .rom_rd(rom_rd), .rom_data(rom_data),
    .ram_addr(ram_addr), .ram_wr_data(ram_wr_data), .ram_wr_bit(ram_wr_bit),
    .ram_rd(ram_rd), .ram_wr(ram_wr), .ram_is_bit(ram_is_bit),
    .ram_rd_data(ram_rd_data), .ram_rd_bit(ram_rd_bit),
    .dec_op_out(dec_op_out), .dec_op_in(dec_op_in),
    .alu_op(alu_op), .alu_src_1(s1), .alu_src_2(s2), .alu_src_3(s3),
    .alu_src_cy(scy), .alu_src_ac(sac), .alu_des_1(d1), .alu_des_2(d2),
    .alu_des_cy(dcy), .alu_des_ac(dac), .alu_des_ov(dov),
    .xm_addr(xm_addr), .xm_wr_data(xm_wr_data), .xm_wr(xm_wr), .xm_rd(xm_rd),
    .xm_rd_data(xm_rd_data), .cpu_state(cs), .exe_state(es)
  );
  v8051_dec u_dec (.op_in(dec_op_out), .op_out(dec_op_in));
  v8051_alu u_alu (.alu_op(alu_op), .src_1(s1), .src_2(s2), .src_3(s3),
                   .src_cy(scy), .src_ac(sac), .des_1(d1), .des_2(d2),
                   .des_cy(dcy), .des_ac(dac), .des_ov(dov));
  v8051_ram u_ram (.clk(clk), .ce(ce), .rst(rst), .addr(ram_addr),
                   .in_data(ram_wr_data), .in_bit_data(ram_wr_bit), .rd(ram_rd),
                   .wr(ram_wr), .is_bit_addr(ram_is_bit), .out_data(ram_rd_data),
                   .out_bit_data(ram_rd_bit), .p0_in(8'h00), .p1_in(8'h00),
                   .p2_in(8'hC3), .p3_in(8'h00), .p0_out(p0), .p1_out(p1),
                   .p2_out(p2), .p3_out(p3));
  v8051_xram #(.ADDR_W(16)) u_xram (.clk(clk), .xm_addr(xm_addr),
                   .xm_wr_data(xm_wr_data), .xm_wr(xm_wr), .xm_rd(xm_rd),
                   .xm_rd_data(xm_rd_data));

  int checks = 0;
  int failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // State-length monitor (counted in slow clocks).
  int run_len = 0;
  cpu_state_e prev_cs = CS_0;
  int n_cs0 = 0, n_bad_len = 0, n_instr = 0;
  always @(posedge clk) if (ce && !rst) begin
    if (cs != prev_cs) begin
      unique case (prev_cs)
        CS_0: begin n_cs0++; if (run_len != 6) n_bad_len++; end
        CS_1: if (run_len != 1) n_bad_len++;
        CS_2: if (run_len != 8) n_bad_len++;
        CS_3: begin n_instr++; if (run_len != 8) n_bad_len++; end
        default: n_bad_len++;
      endcase
      run_len = 1;
      prev_cs = cs;
    end else run_len++;
  end

  typedef struct { logic [7:0] a; logic [7:0] v; } exp_t;
  exp_t exp_ram [] = '{
    '{8'h30,8'h5D}, '{8'h31,8'h10}, '{8'h32,8'h12}, '{8'h33,8'h84}, '{8'h34,8'h0F},
    '{8'h35,8'h40}, '{8'h36,8'h28}, '{8'h37,8'h0A}, '{8'h38,8'h0D}, '{8'h39,8'h11},
    '{8'h3A,8'h47}, '{8'h3B,8'h99}, '{8'h3C,8'h5C}, '{8'h3D,8'h99}, '{8'h3E,8'h33},
    '{8'h3F,8'hBB}, '{8'h40,8'h70}, '{8'h41,8'h6C}, '{8'h42,8'h70}, '{8'h43,8'h75},
    '{8'h44,8'h2F}, '{8'h45,8'h13}, '{8'h46,8'h40}, '{8'h47,8'h3B}, '{8'h48,8'h69},
    '{8'h49,8'h4B}, '{8'h4A,8'hB4}, '{8'h4C,8'h33}, '{8'h4D,8'h03}, '{8'h4E,8'h10},
    '{8'h4F,8'h00}, '{8'h50,8'hA1}, '{8'h51,8'hB2}, '{8'h52,8'hA8}, '{8'h53,8'hA8},
    '{8'h54,8'h6C}, '{8'h55,8'h5A}, '{8'h56,8'h00}, '{8'h57,8'h02}, '{8'h58,8'h01},
    '{8'h59,8'h00}, '{8'h5A,8'h10}, '{8'h5B,8'h3C}, '{8'h5C,8'h4D}, '{8'h5D,8'h9A},
    '{8'h5E,8'h0A}, '{8'h5F,8'h47}, '{8'h60,8'hFA}, '{8'h61,8'hC3}, '{8'h62,8'h70}, '{8'h63,8'h2D}, '{8'h64,8'hCB},
    '{8'h65,8'h3C}, '{8'h66,8'h83}, '{8'h67,8'hFC}, '{8'h68,8'hFB}, '{8'h69,8'h3C},
    '{8'h6A,8'h3C}, '{8'h6B,8'hFC}, '{8'h6C,8'h23}, '{8'h6D,8'hE6}, '{8'h6E,8'h60},
    '{8'h6F,8'h01}, '{8'h2F,8'h15},
    '{8'h20,8'h02}, '{8'h21,8'h0D}, '{8'h08,8'h66}
  };

  initial begin
    repeat (10) @(posedge clk);
    rst = 1'b0;
    // reset sequence: one-hot codes and port initialisation
    @(posedge clk iff (ce && cs == CS_0));
    check("CS_0 code", cs, 4'b0001);
    check("ES_0 code", es, 8'h01);
    @(posedge clk iff (cs == CS_2));
    check("P0 after reset", p0, 8'hFF);
    check("P3 after reset", p3, 8'hFF);
    check("SP after reset", u_ram.sfr[1], 8'h07);
    // wait for the program's completion marker on P1
    @(posedge clk iff (p1 == 8'hA5));
    repeat (60) @(posedge clk);
    foreach (exp_ram[i])
      check($sformatf("iram[%0h]", exp_ram[i].a), u_ram.iram[exp_ram[i].a[6:0]], exp_ram[i].v);
    check("xram[0123]", u_xram.mem[16'h0123], 8'h99);
    check("xram[0041]", u_xram.mem[16'h0041], 8'h5C);
    check("CS_0 seen once", n_cs0, 1);
    check("phase lengths", n_bad_len, 0);
    checks++;
    if (n_instr < 150) begin failures++; $display("FAIL only %0d instructions", n_instr); end
    $display("instructions executed: %0d", n_instr);
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
