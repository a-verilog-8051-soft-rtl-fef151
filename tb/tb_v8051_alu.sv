`timescale 1ns/1ps
// tb_v8051_alu: checks all sixteen ALU functions. First the document's test
// vectors (ALU test table), using the values the 8051 definition gives where
// the printed table is inconsistent with it (55h+50h = A5h sets OV, not C/AC;
// RRC of 55h sets C; the XOR/OR vectors use src_2 = 04h as in the waveform).
// Then 4000 random vectors against a reference model written here with plain
// integer arithmetic. The ALU is combinational: results are sampled 1 ns after
// the inputs change.
module tb_v8051_alu;
  import v8051_pkg::*;

  alu_op_e    op;
  logic [7:0] s1, s2, s3, d1, d2;
  logic       cyi, aci, cy, ac, ov;

  v8051_alu dut (.alu_op(op), .src_1(s1), .src_2(s2), .src_3(s3), .src_cy(cyi),
                 .src_ac(aci), .des_1(d1), .des_2(d2), .des_cy(cy), .des_ac(ac),
                 .des_ov(ov));

  int checks = 0;
  int failures = 0;

  task automatic vec(alu_op_e o, logic [7:0] a, logic [7:0] b, logic [7:0] c,
                     logic ci, logic ai, logic [7:0] e1, logic [7:0] e2,
                     logic eac, logic ecy, logic eov);
    op = o; s1 = a; s2 = b; s3 = c; cyi = ci; aci = ai;
    #1;
    checks++;
    if ({d1, d2, ac, cy, ov} !== {e1, e2, eac, ecy, eov}) begin
      failures++;
      $display("FAIL %s %h %h %h cy%b ac%b: got %h %h ac%b cy%b ov%b exp %h %h ac%b cy%b ov%b",
               o.name(), a, b, c, ci, ai, d1, d2, ac, cy, ov, e1, e2, eac, ecy, eov);
    end
  endtask

  // Reference model.
  task automatic ref_model(alu_op_e o, int a, int b, int c, int ci, int ai,
                           output logic [7:0] e1, output logic [7:0] e2,
                           output logic eac, output logic ecy, output logic eov);
    int r, sa, sb, sr;
    e1 = 0; e2 = 0; eac = 0; ecy = 0; eov = 0;
    sa = (a > 127) ? a - 256 : a;
    sb = (b > 127) ? b - 256 : b;
    case (o)
      ALU_OPC_ADD: begin
        r = a + b + ci; e1 = r[7:0]; ecy = (r > 255);
        eac = ((a % 16) + (b % 16) + ci) > 15;
        sr = sa + sb + ci; eov = (sr > 127) || (sr < -128);
      end
      ALU_OPC_SUB: begin
        r = a - b - ci; e1 = r[7:0]; ecy = (r < 0);
        eac = ((a % 16) - (b % 16) - ci) < 0;
        sr = sa - sb - ci; eov = (sr > 127) || (sr < -128);
      end
      ALU_OPC_MUL: begin r = a * b; e1 = r[7:0]; e2 = r[15:8]; eov = (r > 255); end
      ALU_OPC_DIV: if (b == 0) begin e1 = 8'hFF; eov = 1; end
                   else begin e1 = 8'(a / b); e2 = 8'(a % b); end
      ALU_OPC_DA: begin
        r = a;
        if ((r % 16) > 9 || ai) r = r + 6;
        if (r > 255) ecy = 1;
        if (ci) ecy = 1;
        if (((r / 16) % 16) > 9 || ecy) r = (r % 256) + 96;
        if (r > 255) ecy = 1;
        e1 = r[7:0];
      end
      ALU_OPC_NOT: e1 = 8'(255 - a);
      ALU_OPC_AND: e1 = 8'(a & b);
      ALU_OPC_XOR: e1 = 8'(a ^ b);
      ALU_OPC_OR:  e1 = 8'(a | b);
      ALU_OPC_RL:  e1 = 8'((a * 2) % 256 + a / 128);
      ALU_OPC_RLC: begin e1 = 8'((a * 2) % 256 + ci); ecy = (a >= 128); end
      ALU_OPC_RR:  e1 = 8'(a / 2 + (a % 2) * 128);
      ALU_OPC_RRC: begin e1 = 8'(a / 2 + ci * 128); ecy = (a % 2) == 1; end
      ALU_OPC_PCSADD: begin
        r = (b * 256 + a + ((c > 127) ? c - 256 : c)) % 65536;
        e1 = r[7:0]; e2 = r[15:8];
      end
      ALU_OPC_PCUADD: begin
        r = (b * 256 + a + c) % 65536; e1 = r[7:0]; e2 = r[15:8];
      end
      default: ;
    endcase
  endtask

  initial begin
    // document vectors: op, src_1, src_2, src_3, cy, ac -> des_1, des_2, ac, cy, ov
    vec(ALU_OPC_NONE,   8'h55, 8'h00, 8'h00, 0, 0, 8'h00, 8'h00, 0, 0, 0);
    vec(ALU_OPC_ADD,    8'h55, 8'hFF, 8'h00, 0, 0, 8'h54, 8'h00, 1, 1, 0);
    vec(ALU_OPC_ADD,    8'hAA, 8'hFF, 8'h00, 0, 0, 8'hA9, 8'h00, 1, 1, 0);
    vec(ALU_OPC_ADD,    8'h55, 8'h50, 8'h00, 0, 0, 8'hA5, 8'h00, 0, 0, 1);
    vec(ALU_OPC_SUB,    8'hAA, 8'h00, 8'h00, 0, 0, 8'hAA, 8'h00, 0, 0, 0);
    vec(ALU_OPC_SUB,    8'h55, 8'h50, 8'h00, 0, 0, 8'h05, 8'h00, 0, 0, 0);
    vec(ALU_OPC_MUL,    8'hAA, 8'h00, 8'h00, 0, 0, 8'h00, 8'h00, 0, 0, 0);
    vec(ALU_OPC_MUL,    8'hAA, 8'h72, 8'h00, 0, 0, 8'hB4, 8'h4B, 0, 0, 1);
    vec(ALU_OPC_MUL,    8'h55, 8'h72, 8'h00, 0, 0, 8'hDA, 8'h25, 0, 0, 1);
    vec(ALU_OPC_DIV,    8'h55, 8'h72, 8'h00, 0, 0, 8'h00, 8'h55, 0, 0, 0);
    vec(ALU_OPC_DIV,    8'hC2, 8'h72, 8'h00, 0, 0, 8'h01, 8'h50, 0, 0, 0);
    vec(ALU_OPC_DIV,    8'hC2, 8'h00, 8'h00, 0, 0, 8'hFF, 8'h00, 0, 0, 1);
    vec(ALU_OPC_DA,     8'hC2, 8'h00, 8'h00, 0, 0, 8'h22, 8'h00, 0, 1, 0);
    vec(ALU_OPC_NOT,    8'h55, 8'h50, 8'h00, 0, 0, 8'hAA, 8'h00, 0, 0, 0);
    vec(ALU_OPC_AND,    8'h55, 8'h50, 8'h00, 0, 0, 8'h50, 8'h00, 0, 0, 0);
    vec(ALU_OPC_XOR,    8'h55, 8'h04, 8'h00, 0, 0, 8'h51, 8'h00, 0, 0, 0);
    vec(ALU_OPC_OR,     8'h55, 8'h04, 8'h00, 0, 0, 8'h55, 8'h00, 0, 0, 0);
    vec(ALU_OPC_RL,     8'h55, 8'h50, 8'h00, 0, 0, 8'hAA, 8'h00, 0, 0, 0);
    vec(ALU_OPC_RLC,    8'h55, 8'h50, 8'h00, 0, 0, 8'hAA, 8'h00, 0, 0, 0);
    vec(ALU_OPC_RR,     8'h55, 8'h50, 8'h00, 0, 0, 8'hAA, 8'h00, 0, 0, 0);
    vec(ALU_OPC_RRC,    8'h55, 8'h50, 8'h00, 0, 0, 8'h2A, 8'h00, 0, 1, 0);
    vec(ALU_OPC_PCSADD, 8'h55, 8'h50, 8'hB7, 0, 0, 8'h0C, 8'h50, 0, 0, 0);
    vec(ALU_OPC_PCUADD, 8'h55, 8'h50, 8'hB7, 0, 0, 8'h0C, 8'h51, 0, 0, 0);
    // random vectors against the reference model
    for (int i = 0; i < 4000; i++) begin
      logic [7:0] e1, e2;
      logic eac, ecy, eov;
      alu_op_e o;
      logic [7:0] a, b, c;
      logic ci, ai;
      o = alu_op_e'($urandom_range(0, 15));
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      if ($urandom_range(0, 15) == 0) b = 8'h00;
      ci = 1'($urandom); ai = 1'($urandom);
      ref_model(o, a, b, c, ci, ai, e1, e2, eac, ecy, eov);
      vec(o, a, b, c, ci, ai, e1, e2, eac, ecy, eov);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
