`timescale 1ns/1ps
// tb_v8051_system: end-to-end test of the complete system (core plus external
// data memory) running a 548-byte program (tb/tb_v8051_ctr_prog.hex) that
// exercises every instruction group of the 8051. The program leaves its
// results in internal RAM 08h-62h and external RAM 0041h/0123h and finally
// writes A5h to P1; the expected bytes were worked out by hand from the 8051
// instruction definitions. A wrong branch path writes a marker to 4Fh.
//
// Every mechanism of the design is counted while the program runs, and one
// that never happens counts as a failure: the reset cycle (CS_0), the
// reserved cycle (CS_1), fetch/decode (CS_2) and execute (CS_3) phases,
// one-, two- and three-byte instructions, every ALU function the controller
// uses, conditional branches taken and not taken, calls and returns, stack
// pushes, MOVX reads and writes of the external memory, MOVC reads of the
// program memory, bit reads and writes, port-pin reads, port-latch writes,
// overflow and auxiliary-carry flag results, and the one-in-three clock
// enable. Also checks that every instruction takes 51 fast clocks and that
// each of the 111 instruction forms of the decoder was executed at least once.
module tb_v8051_system;
  import v8051_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [7:0] p0_out, p1_out, p2_out, p3_out;
  cpu_state_e cs;
  exe_state_e es;

  v8051_system #(.ROM_FILE("tb/tb_v8051_ctr_prog.hex")) dut (
    .clkfast(clk), .rst(rst),
    .p0_in(8'h00), .p1_in(8'h00), .p2_in(8'hC3), .p3_in(8'h00),
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

  // ---- mechanism counters ----
  int n_cs [4];
  int n_len [4];           // instructions of 1, 2, 3 bytes (index 1..3)
  int n_alu [16];
  int n_taken = 0, n_not_taken = 0, n_call = 0, n_ret = 0, n_push = 0;
  int n_xwr = 0, n_xrd = 0, n_movc = 0, n_bit_rd = 0, n_bit_wr = 0;
  int n_port_rd = 0, n_port_wr = 0, n_ov = 0, n_ac = 0, n_ce = 0, n_fast = 0;
  int n_bad_period = 0;
  bit seen [128];
  longint fast = 0, last_fetch = -1;

  always @(posedge clk) begin
    fast <= fast + 1;
    if (!rst) n_fast++;
    if (dut.u_core.ce) n_ce++;
  end

  always @(posedge clk) if (!rst && dut.u_core.ce) begin
    // phases, counted once per entry
    if (es == ES_0) begin
      case (cs)
        CS_0: n_cs[0]++;
        CS_1: n_cs[1]++;
        CS_2: begin
          n_cs[2]++;
          if (last_fetch >= 0 && fast - last_fetch != 51) n_bad_period++;
          last_fetch = fast;
        end
        CS_3: begin
          n_cs[3]++;
          n_len[1 + int'(dut.u_core.dec_op_in.op2) + int'(dut.u_core.dec_op_in.op3)]++;
          seen[dut.u_core.dec_op_in.ins] = 1'b1;
          case (dut.u_core.dec_op_in.ins)
            I_ACALL, I_LCALL: n_call++;
            I_RET:            n_ret++;
            I_PUSH:           n_push++;
            I_MOVC_1, I_MOVC_2: n_movc++;
            default: ;
          endcase
        end
        default: ;
      endcase
    end
    n_alu[dut.u_core.alu_op]++;   // slow clocks with each ALU function selected
    if (cs == CS_3 && es == ES_3) begin
      if (dut.u_core.alu_des_ov && dut.u_core.alu_op inside {ALU_OPC_ADD, ALU_OPC_SUB}) n_ov++;
      if (dut.u_core.alu_des_ac && dut.u_core.alu_op inside {ALU_OPC_ADD, ALU_OPC_SUB}) n_ac++;
    end
    if (cs == CS_3 && es == ES_6) begin
      case (dut.u_core.dec_op_in.ins)
        I_JB, I_JBC, I_JNB, I_JC, I_JNC, I_JZ, I_JNZ, I_CJNE_1, I_CJNE_2,
        I_CJNE_3, I_CJNE_4, I_DJNZ_1, I_DJNZ_2:
          if (dut.u_core.u_ctr.take) n_taken++; else n_not_taken++;
        default: ;
      endcase
    end
    if (dut.xm_wr) n_xwr++;
    if (dut.xm_rd) n_xrd++;
    if (dut.u_core.ram_is_bit && dut.u_core.ram_rd) n_bit_rd++;
    if (dut.u_core.ram_is_bit && dut.u_core.ram_wr) n_bit_wr++;
    if (cs == CS_3 && dut.u_core.ram_rd && !dut.u_core.ram_is_bit &&
        dut.u_core.ram_addr inside {8'h80, 8'h90, 8'hA0, 8'hB0}) n_port_rd++;
    if (cs == CS_3 && dut.u_core.ram_wr && !dut.u_core.ram_is_bit &&
        dut.u_core.ram_addr inside {8'h80, 8'h90, 8'hA0, 8'hB0}) n_port_wr++;
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

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (10) @(posedge clk);
    rst = 1'b0;
    @(posedge clk iff (cs == CS_2));
    check("P0 after reset", p0_out, 8'hFF);
    check("P1 after reset", p1_out, 8'hFF);
    check("P2 after reset", p2_out, 8'hFF);
    check("P3 after reset", p3_out, 8'hFF);
    check("SP after reset", dut.u_core.u_ram.sfr[1], 8'h07);
    @(posedge clk iff (p1_out == 8'hA5));
    repeat (60) @(posedge clk);
    foreach (exp_ram[i])
      check($sformatf("iram[%0h]", exp_ram[i].a),
            dut.u_core.u_ram.iram[exp_ram[i].a[6:0]], exp_ram[i].v);
    check("xram[0123]", dut.u_xram.mem[16'h0123], 8'h99);
    check("xram[0041]", dut.u_xram.mem[16'h0041], 8'h5C);
    check("instruction period 51 fast clocks", n_bad_period, 0);
    check("reset cycle entered once", n_cs[0], 1);
    check("one CS_1 per instruction", n_cs[1], n_cs[3]);
    checks++;
    if (n_ce * 3 < n_fast - 3 || n_ce * 3 > n_fast + 3) begin
      failures++;
      $display("FAIL clock enable rate: %0d in %0d fast clocks", n_ce, n_fast);
    end
    $display("mechanisms:");
    need("reset cycle CS_0", n_cs[0]);
    need("reserved cycle CS_1", n_cs[1]);
    need("fetch/decode CS_2", n_cs[2]);
    need("execute CS_3", n_cs[3]);
    need("1-byte instructions", n_len[1]);
    need("2-byte instructions", n_len[2]);
    need("3-byte instructions", n_len[3]);
    for (int i = 1; i < 16; i++) need($sformatf("ALU %s", alu_op_e'(i)), n_alu[i]);
    need("branch taken", n_taken);
    need("branch not taken", n_not_taken);
    need("call", n_call);
    need("return", n_ret);
    need("push", n_push);
    need("MOVX write", n_xwr);
    need("MOVX read", n_xrd);
    need("MOVC", n_movc);
    need("bit read", n_bit_rd);
    need("bit write", n_bit_wr);
    need("port pin read", n_port_rd);
    need("port latch write", n_port_wr);
    need("overflow flag set", n_ov);
    need("aux carry flag set", n_ac);
    need("slow clock enables", n_ce);
    $display("instructions executed: %0d", n_cs[3]);
    begin
      int nf;
      string miss;
      nf = 0; miss = "";
      for (int i = 0; i <= int'(I_XRL_6); i++)
        if (seen[i]) nf++;
        else begin
          instr_e f;
          f = instr_e'(i);
          miss = {miss, " ", f.name()};
        end
      $display("instruction forms executed: %0d of %0d; not executed:%s", nf, int'(I_XRL_6) + 1, miss);
      check("all instruction forms executed", nf, int'(I_XRL_6) + 1);
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
