`timescale 1ns/1ps
// tb_v8051_dec: checks the instruction decoder.
// Part 1 applies the twelve opcodes of the document's decoder test (ADD A,#;
// ADD A,@Ri; SUBB A,Rn; SUBB A,dir; MOVC A,@A+DPTR; NOP; RR; RLC; ANL dir,A;
// ANL dir,#; XRL A,dir; XRL A,Rn) and compares the full 9-bit output with the
// expected values, e.g. 53h -> 1_1_0001111. Part 2 walks all 256 opcodes and
// compares the byte-count flags with a per-row length table of the standard
// 8051 instruction set written out here, and checks that the pointer of every
// register/indirect column variant matches its row's first member. The
// decoder is combinational; outputs are sampled 1 ns after each input change.
module tb_v8051_dec;
  import v8051_pkg::*;

  logic [7:0] op_in;
  dec_t       op_out;

  v8051_dec dut (.op_in(op_in), .op_out(op_out));

  int checks = 0;
  int failures = 0;

  // Instruction length of opcode {row, col}: one string per row, 16 digits.
  string len_row [16] = '{
    "1231121111111111", "3231121111111111", "3211221111111111", "3211221111111111",
    "2223221111111111", "2223221111111111", "2223221111111111", "2221232222222222",
    "2221132222222222", "3221221111111111", "2221112222222222", "2221333333333333",
    "2221121111111111", "2221131122222222", "1211121111111111", "1211121111111111"};

  task automatic check9(logic [7:0] op, logic [8:0] exp);
    op_in = op;
    #1;
    checks++;
    if (op_out !== exp) begin
      failures++;
      $display("FAIL op %h: got %b exp %b", op, op_out, exp);
    end
  endtask

  initial begin
    // document's decoder test
    check9(8'h24, {1'b0, 1'b1, 7'h04});
    check9(8'h26, {1'b0, 1'b0, 7'h03});
    check9(8'h27, {1'b0, 1'b0, 7'h03});
    check9(8'h98, {1'b0, 1'b0, 7'h60});
    check9(8'h9F, {1'b0, 1'b0, 7'h60});
    check9(8'h95, {1'b0, 1'b1, 7'h61});
    check9(8'h93, {1'b0, 1'b0, 7'h45});
    check9(8'h00, {1'b0, 1'b0, 7'h4C});
    check9(8'h03, {1'b0, 1'b0, 7'h5B});
    check9(8'h33, {1'b0, 1'b0, 7'h5A});
    check9(8'h52, {1'b0, 1'b1, 7'h0E});
    check9(8'h53, {1'b1, 1'b1, 7'h0F});
    check9(8'h65, {1'b0, 1'b1, 7'h6A});
    check9(8'h68, {1'b0, 1'b0, 7'h69});
    check9(8'hA5, {1'b0, 1'b0, 7'h6F});
    // a few more pointers of the alphabetical list
    check9(8'h11, {1'b0, 1'b1, 7'h00});   // ACALL
    check9(8'h02, {1'b1, 1'b1, 7'h32});   // LJMP
    check9(8'hF5, {1'b0, 1'b1, 7'h3A});   // MOV_8 dir,A
    check9(8'hE2, {1'b0, 1'b0, 7'h47});   // MOVX_1
    // lengths of all opcodes
    for (int op = 0; op < 256; op++) begin
      int n;
      n = len_row[op / 16][op % 16] - "0";
      op_in = 8'(op);
      #1;
      checks++;
      if (op_out.op2 !== (n >= 2) || op_out.op3 !== (n == 3)) begin
        failures++;
        $display("FAIL length op %h: got %b%b exp %0d bytes", op, op_out.op3, op_out.op2, n);
      end
      // Rn column (x8..xF) and @Ri column (x6, x7) share one pointer per row
      if (op % 16 > 8 || op % 16 == 7) begin
        instr_e p;
        p = op_out.ins;
        op_in = 8'(op - 1);
        #1;
        checks++;
        if (op_out.ins !== p) begin
          failures++;
          $display("FAIL column op %h: pointer %h differs from op %h", op, p, op - 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
