`timescale 1ns/1ps
// tb_v8051_ram: checks the internal data memory against a reference model.
// The clock enable is high one clock in three, as in the core, and the
// request signals stay asserted through the two disabled clocks so that any
// access not gated by ce shows up as a mismatch. Checks: every byte reads 00h
// after reset (ports read their pins, PSW its parity bit); 6000 random byte
// and bit reads and writes over the whole 00h-FFh space, including the
// bit-addressable RAM bytes 20h-2Fh and SFRs; port latch outputs; PSW.0 as
// the parity of ACC; out_data held while no read is made. A directed part
// replays the document's bit test: bytes 20h-2Fh written with A2h + 11h*k and
// read back bit by bit, then P1/PSW/A/B written with E6h/2Ah/F7h/F7h and
// read through their bit addresses. Read data is
// compared one enabled clock after the request (one slow clock of latency).
module tb_v8051_ram;
  import v8051_pkg::*;

  logic       clk = 1'b0;
  logic       ce = 1'b0;
  logic       rst = 1'b1;
  logic [7:0] addr = '0, in_data = '0;
  logic       in_bit = 1'b0, rd = 1'b0, wr = 1'b0, is_bit = 1'b0;
  logic [7:0] out_data;
  logic       out_bit;
  logic [7:0] p0_in = 8'h3C, p1_in = 8'hA5, p2_in = 8'h0F, p3_in = 8'hF0;
  logic [7:0] p0_out, p1_out, p2_out, p3_out;

  v8051_ram dut (.clk(clk), .ce(ce), .rst(rst), .addr(addr), .in_data(in_data),
                 .in_bit_data(in_bit), .rd(rd), .wr(wr), .is_bit_addr(is_bit),
                 .out_data(out_data), .out_bit_data(out_bit),
                 .p0_in(p0_in), .p1_in(p1_in), .p2_in(p2_in), .p3_in(p3_in),
                 .p0_out(p0_out), .p1_out(p1_out), .p2_out(p2_out), .p3_out(p3_out));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // reference: 256 bytes, valid[] marks implemented locations
  logic [7:0] mem [256];
  bit         valid [256];

  function automatic bit is_port(int a);
    return a == 'h80 || a == 'h90 || a == 'hA0 || a == 'hB0;
  endfunction

  function automatic logic [7:0] expect_byte(int a);
    if (!valid[a]) return 8'h00;
    case (a)
      'h80: return p0_in;
      'h90: return p1_in;
      'hA0: return p2_in;
      'hB0: return p3_in;
      'hD0: return {mem[a][7:1], ^mem['hE0]};
      default: return mem[a];
    endcase
  endfunction

  function automatic int bit_byte(int b);
    return (b < 128) ? 'h20 + b / 8 : b - b % 8;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // One access: present it, give one enabled clock, then two disabled ones.
  task automatic access(logic r, logic w, logic b, logic [7:0] a, logic [7:0] d, logic bd);
    @(negedge clk);
    rd = r; wr = w; is_bit = b; addr = a; in_data = d; in_bit = bd;
    ce = 1'b1;
    @(negedge clk);
    ce = 1'b0;
    repeat (2) @(negedge clk);
    rd = 1'b0; wr = 1'b0;
  endtask

  initial begin
    int sfrs [21] = '{'h80, 'h81, 'h82, 'h83, 'h87, 'h88, 'h89, 'h8A, 'h8B, 'h8C,
                      'h8D, 'h90, 'h98, 'h99, 'hA0, 'hA8, 'hB0, 'hB8, 'hD0, 'hE0, 'hF0};
    logic [7:0] held;
    for (int i = 0; i < 256; i++) begin mem[i] = 8'h00; valid[i] = (i < 128); end
    foreach (sfrs[i]) valid[sfrs[i]] = 1'b1;
    // write garbage before reset so reset clearing is visible
    rst = 1'b0;
    for (int i = 0; i < 256; i += 7) access(0, 1, 0, 8'(i), 8'h5A, 0);
    rst = 1'b1;
    repeat (6) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 256; i++) begin
      access(1, 0, 0, 8'(i), 8'h00, 0);
      check($sformatf("reset value of %h", i), out_data, expect_byte(i));
    end
    // random accesses
    for (int n = 0; n < 6000; n++) begin
      int kind, a;
      logic [7:0] d;
      kind = $urandom_range(0, 3);
      d    = 8'($urandom);
      if ($urandom_range(0, 3) == 0) a = sfrs[$urandom_range(0, 20)];
      else if ($urandom_range(0, 1) == 0) a = $urandom_range(8'h20, 8'h2F);
      else a = $urandom_range(0, 255);
      case (kind)
        0: begin  // byte write
          access(0, 1, 0, 8'(a), d, 0);
          if (valid[a]) mem[a] = d;
        end
        1: begin  // byte read
          access(1, 0, 0, 8'(a), 8'h00, 0);
          check($sformatf("byte read %h", a), out_data, expect_byte(a));
        end
        2: begin  // bit write, bit address taken from the random byte
          int bb;
          bb = bit_byte(d);
          access(0, 1, 1, d, 8'h00, a[0]);
          if (valid[bb]) mem[bb][d % 8] = a[0];
        end
        default: begin  // bit read; out_data must not change
          int bb;
          held = out_data;
          bb = bit_byte(d);
          access(1, 0, 1, d, 8'h00, 0);
          check($sformatf("bit read %h", d), out_bit, expect_byte(bb) >> (d % 8) & 1);
          check("out_data held on bit read", out_data, held);
        end
      endcase
      check("p0_out", p0_out, mem['h80]);
      check("p1_out", p1_out, mem['h90]);
      check("p2_out", p2_out, mem['hA0]);
      check("p3_out", p3_out, mem['hB0]);
    end
    // Directed replay of the published bit test. RAM: bytes 20h-2Fh written
    // with A2h + 11h*k, then all 128 bits read back through bit addresses.
    for (int k = 0; k < 16; k++) access(0, 1, 0, 8'('h20 + k), 8'('hA2 + 'h11 * k), 0);
    for (int b = 0; b < 128; b++) begin
      logic [7:0] v;
      v = 8'('hA2 + 'h11 * (b / 8));
      access(1, 0, 1, 8'(b), 8'h00, 0);
      check($sformatf("bit %h of pattern", b), out_bit, v[b % 8]);
    end
    for (int k = 0; k < 16; k++) mem['h20 + k] = 8'('hA2 + 'h11 * k);
    // SFRs: P1 <- E6h, PSW <- 2Ah, A <- F7h, B <- F7h, then bit reads. P1
    // reads its pins (A5h); PSW.0 reads the parity of A (F7h has seven ones).
    access(0, 1, 0, 8'h90, 8'hE6, 0);
    access(0, 1, 0, 8'hD0, 8'h2A, 0);
    access(0, 1, 0, 8'hE0, 8'hF7, 0);
    access(0, 1, 0, 8'hF0, 8'hF7, 0);
    check("P1 latch after E6h", p1_out, 8'hE6);
    for (int i = 0; i < 8; i++) begin
      logic [7:0] e_p1, e_psw, e_ab;
      e_p1 = 8'hA5; e_psw = 8'h2B; e_ab = 8'hF7;
      access(1, 0, 1, 8'('h90 + i), 8'h00, 0); check($sformatf("P1.%0d", i), out_bit, e_p1[i]);
      access(1, 0, 1, 8'('hD0 + i), 8'h00, 0); check($sformatf("PSW.%0d", i), out_bit, e_psw[i]);
      access(1, 0, 1, 8'('hE0 + i), 8'h00, 0); check($sformatf("ACC.%0d", i), out_bit, e_ab[i]);
      access(1, 0, 1, 8'('hF0 + i), 8'h00, 0); check($sformatf("B.%0d", i), out_bit, e_ab[i]);
    end
    // clearing B.0 and ACC.0 by bit writes: B reads F6h, parity of F6h is 0
    access(0, 1, 1, 8'hF0, 8'h00, 0);
    access(0, 1, 1, 8'hE0, 8'h00, 0);
    access(1, 0, 0, 8'hF0, 8'h00, 0); check("B after bit clear", out_data, 8'hF6);
    access(1, 0, 0, 8'hD0, 8'h00, 0); check("PSW after ACC.0 clear", out_data, 8'h2A);
    // out_data holds during reset
    held = out_data;
    rst = 1'b1;
    ce = 1'b1; rd = 1'b1; addr = 8'h30;
    repeat (3) @(negedge clk);
    check("out_data held in reset", out_data, held);
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
