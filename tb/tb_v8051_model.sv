`timescale 1ns/1ps
// tb_v8051_model: tests the core (v8051_model) running the port test program
// of the document (tb/tb_v8051_led.hex): A <- P0 pins, B <- P1 pins, R5 <- 4;
// four times: RLC A, A -> P0, swap A/B, RRC A, A -> P1, swap back; then start
// over with new pin values. The carry flag runs through both rotates and
// carries over from one round to the next. The expected P0/P1 write sequence
// is computed here from those rules, for eight rounds with different pin
// values (the first 3Ah/12h, then random), and each port-latch write is
// compared in order. For the first round the expected values are also held
// against the sequence the document reports for these pins: P0 74h, E8h,
// D1h, A2h and P1 09h, 04h, 82h, C1h. Also checks the reset values of the ports, that no
// MOVX strobe is ever raised, and the instruction time: 7 instructions
// (357 fast clocks) between successive P0 writes inside a round.
module tb_v8051_model;
  import v8051_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [7:0]  p0_in = 8'h3A, p1_in = 8'h12;
  logic [7:0]  p0_out, p1_out, p2_out, p3_out;
  logic [15:0] xm_addr;
  logic [7:0]  xm_wr_data;
  logic        xm_wr, xm_rd;
  cpu_state_e  cs;
  exe_state_e  es;

  v8051_model #(.ROM_FILE("tb/tb_v8051_led.hex")) dut (
    .clkfast(clk), .rst(rst),
    .p0_in(p0_in), .p1_in(p1_in), .p2_in(8'h00), .p3_in(8'h00),
    .p0_out(p0_out), .p1_out(p1_out), .p2_out(p2_out), .p3_out(p3_out),
    .xm_addr(xm_addr), .xm_wr_data(xm_wr_data), .xm_wr(xm_wr), .xm_rd(xm_rd),
    .xm_rd_data(8'h00), .cpu_state(cs), .exe_state(es));

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

  localparam int ROUNDS = 8;
  logic [7:0] in0 [ROUNDS], in1 [ROUNDS];
  logic [7:0] exp0 [ROUNDS*4], exp1 [ROUNDS*4];
  localparam logic [7:0] doc0 [4] = '{8'h74, 8'hE8, 8'hD1, 8'hA2};
  localparam logic [7:0] doc1 [4] = '{8'h09, 8'h04, 8'h82, 8'hC1};
  int n0 = 0, n1 = 0, n_xm = 0, n_bad_gap = 0;
  longint fast = 0, t_p0 = 0;

  always @(posedge clk) fast <= fast + 1;

  // port-latch writes seen at the RAM
  always @(posedge clk) if (!rst && dut.ce && dut.ram_wr && !dut.ram_is_bit) begin
    if (dut.ram_addr == 8'h80 && cs == CS_3) begin
      if (n0 < ROUNDS*4) check($sformatf("P0 write %0d", n0), dut.ram_wr_data, exp0[n0]);
      if (n0 % 4 != 0 && fast - t_p0 != 357) n_bad_gap++;
      t_p0 = fast;
      n0++;
    end
    if (dut.ram_addr == 8'h90 && cs == CS_3) begin
      if (n1 < ROUNDS*4) check($sformatf("P1 write %0d", n1), dut.ram_wr_data, exp1[n1]);
      n1++;
      // new pin values once the round's last write is done
      if (n1 % 4 == 0 && n1 / 4 < ROUNDS) begin
        p0_in <= in0[n1 / 4];
        p1_in <= in1[n1 / 4];
      end
    end
  end
  always @(posedge clk) if (xm_wr || xm_rd) n_xm++;

  initial begin
    logic [7:0] a, b;
    logic c;
    in0[0] = 8'h3A; in1[0] = 8'h12;
    for (int r = 1; r < ROUNDS; r++) begin in0[r] = 8'($urandom); in1[r] = 8'($urandom); end
    c = 1'b0;
    for (int r = 0; r < ROUNDS; r++) begin
      a = in0[r]; b = in1[r];
      for (int k = 0; k < 4; k++) begin
        {c, a} = {a, c};                 // RLC A
        exp0[r*4+k] = a;
        {a, c} = {c, b};                 // RRC on B's value (A and B swapped)
        b = a; a = exp0[r*4+k];          // the swap back: B keeps the rotated value
        exp1[r*4+k] = b;
      end
    end
    // the first round's port values as published for pins 3Ah/12h
    foreach (doc0[k]) begin
      check($sformatf("published P0 value %0d", k), exp0[k], doc0[k]);
      check($sformatf("published P1 value %0d", k), exp1[k], doc1[k]);
    end
    repeat (10) @(posedge clk);
    rst = 1'b0;
    @(posedge clk iff (cs == CS_2));
    check("P0 after reset", p0_out, 8'hFF);
    check("P1 after reset", p1_out, 8'hFF);
    check("P2 after reset", p2_out, 8'hFF);
    check("P3 after reset", p3_out, 8'hFF);
    wait (n1 == ROUNDS*4);
    repeat (10) @(posedge clk);
    check("P0 writes", n0, ROUNDS*4);
    check("P1 pins after last round", p1_out, exp1[ROUNDS*4-1]);
    check("no MOVX strobes", n_xm, 0);
    check("P0 write spacing 357 fast clocks", n_bad_gap, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
