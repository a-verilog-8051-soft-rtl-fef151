// v8051_dec: instruction decoder of the v8051 soft core.
//
// Combinational. Maps the 8-bit opcode fetched by the controller to a 9-bit
// word: bits [6:0] are the instruction pointer (which of the 111 instruction
// forms it is, see instr_e in v8051_pkg), bit [7] is set when the instruction
// has a second byte and bit [8] when it has a third byte. The controller uses
// the pointer to choose its execute sequence and the two flags to advance the
// program counter past the operands.
//
// The output format and the pointer values follow the document's decoder
// (e.g. 24h -> ADD_4 = 04h with bit 7 set, 53h -> ANL_6 = 0Fh with bits 8
// and 7 set). The document keeps the mapping in a look-up file; here it is
// written out as a case statement over the standard 8051 opcode map. The
// undefined opcode A5h decodes to the pointer 6Fh, a one-byte no-operation.
module v8051_dec
  import v8051_pkg::*;
(
  input  logic [7:0] op_in,
  output dec_t       op_out
);

  always_comb begin
    instr_e ins;
    logic   b2, b3;
    ins = I_UNDEF;
    b2  = 1'b0;
    b3  = 1'b0;
    // Register (Rn) and indirect (@Ri) columns, regular in the upper rows.
    if (op_in[3]) begin
      unique case (op_in[7:4])
        4'h0: ins = I_INC_2;
        4'h1: ins = I_DEC_2;
        4'h2: ins = I_ADD_1;
        4'h3: ins = I_ADDC_1;
        4'h4: ins = I_ORL_1;
        4'h5: ins = I_ANL_1;
        4'h6: ins = I_XRL_1;
        4'h7: begin ins = I_MOV_7;  b2 = 1'b1; end
        4'h8: begin ins = I_MOV_9;  b2 = 1'b1; end
        4'h9: ins = I_SUBB_1;
        4'hA: begin ins = I_MOV_6;  b2 = 1'b1; end
        4'hB: begin ins = I_CJNE_3; b2 = 1'b1; b3 = 1'b1; end
        4'hC: ins = I_XCH_1;
        4'hD: begin ins = I_DJNZ_1; b2 = 1'b1; end
        4'hE: ins = I_MOV_1;
        4'hF: ins = I_MOV_5;
        default: ;
      endcase
    end else if (op_in[2:1] == 2'b11) begin
      unique case (op_in[7:4])
        4'h0: ins = I_INC_4;
        4'h1: ins = I_DEC_4;
        4'h2: ins = I_ADD_3;
        4'h3: ins = I_ADDC_3;
        4'h4: ins = I_ORL_3;
        4'h5: ins = I_ANL_3;
        4'h6: ins = I_XRL_3;
        4'h7: begin ins = I_MOV_15; b2 = 1'b1; end
        4'h8: begin ins = I_MOV_11; b2 = 1'b1; end
        4'h9: ins = I_SUBB_3;
        4'hA: begin ins = I_MOV_14; b2 = 1'b1; end
        4'hB: begin ins = I_CJNE_4; b2 = 1'b1; b3 = 1'b1; end
        4'hC: ins = I_XCH_3;
        4'hD: ins = I_XCHD;
        4'hE: ins = I_MOV_3;
        4'hF: ins = I_MOV_13;
        default: ;
      endcase
    end else if (op_in[3:0] == 4'h1) begin
      // AJMP / ACALL with address bits [10:8] in opcode bits [7:5].
      ins = op_in[4] ? I_ACALL : I_AJMP;
      b2  = 1'b1;
    end else begin
      unique case (op_in)
        8'h00: ins = I_NOP;
        8'h02: begin ins = I_LJMP;   b2 = 1'b1; b3 = 1'b1; end
        8'h03: ins = I_RR;
        8'h04: ins = I_INC_1;
        8'h05: begin ins = I_INC_3;  b2 = 1'b1; end
        8'h10: begin ins = I_JBC;    b2 = 1'b1; b3 = 1'b1; end
        8'h12: begin ins = I_LCALL;  b2 = 1'b1; b3 = 1'b1; end
        8'h13: ins = I_RRC;
        8'h14: ins = I_DEC_1;
        8'h15: begin ins = I_DEC_3;  b2 = 1'b1; end
        8'h20: begin ins = I_JB;     b2 = 1'b1; b3 = 1'b1; end
        8'h22: ins = I_RET;
        8'h23: ins = I_RL;
        8'h24: begin ins = I_ADD_4;  b2 = 1'b1; end
        8'h25: begin ins = I_ADD_2;  b2 = 1'b1; end
        8'h30: begin ins = I_JNB;    b2 = 1'b1; b3 = 1'b1; end
        8'h32: ins = I_RETI;
        8'h33: ins = I_RLC;
        8'h34: begin ins = I_ADDC_4; b2 = 1'b1; end
        8'h35: begin ins = I_ADDC_2; b2 = 1'b1; end
        8'h40: begin ins = I_JC;     b2 = 1'b1; end
        8'h42: begin ins = I_ORL_5;  b2 = 1'b1; end
        8'h43: begin ins = I_ORL_6;  b2 = 1'b1; b3 = 1'b1; end
        8'h44: begin ins = I_ORL_4;  b2 = 1'b1; end
        8'h45: begin ins = I_ORL_2;  b2 = 1'b1; end
        8'h50: begin ins = I_JNC;    b2 = 1'b1; end
        8'h52: begin ins = I_ANL_5;  b2 = 1'b1; end
        8'h53: begin ins = I_ANL_6;  b2 = 1'b1; b3 = 1'b1; end
        8'h54: begin ins = I_ANL_4;  b2 = 1'b1; end
        8'h55: begin ins = I_ANL_2;  b2 = 1'b1; end
        8'h60: begin ins = I_JZ;     b2 = 1'b1; end
        8'h62: begin ins = I_XRL_5;  b2 = 1'b1; end
        8'h63: begin ins = I_XRL_6;  b2 = 1'b1; b3 = 1'b1; end
        8'h64: begin ins = I_XRL_4;  b2 = 1'b1; end
        8'h65: begin ins = I_XRL_2;  b2 = 1'b1; end
        8'h70: begin ins = I_JNZ;    b2 = 1'b1; end
        8'h72: begin ins = I_ORL_7;  b2 = 1'b1; end
        8'h73: ins = I_JMP;
        8'h74: begin ins = I_MOV_4;  b2 = 1'b1; end
        8'h75: begin ins = I_MOV_12; b2 = 1'b1; b3 = 1'b1; end
        8'h80: begin ins = I_SJMP;   b2 = 1'b1; end
        8'h82: begin ins = I_ANL_7;  b2 = 1'b1; end
        8'h83: ins = I_MOVC_2;
        8'h84: ins = I_DIV;
        8'h85: begin ins = I_MOV_10; b2 = 1'b1; b3 = 1'b1; end
        8'h90: begin ins = I_MOV_18; b2 = 1'b1; b3 = 1'b1; end
        8'h92: begin ins = I_MOV_17; b2 = 1'b1; end
        8'h93: ins = I_MOVC_1;
        8'h94: begin ins = I_SUBB_4; b2 = 1'b1; end
        8'h95: begin ins = I_SUBB_2; b2 = 1'b1; end
        8'hA0: begin ins = I_ORL_8;  b2 = 1'b1; end
        8'hA2: begin ins = I_MOV_16; b2 = 1'b1; end
        8'hA3: ins = I_INC_5;
        8'hA4: ins = I_MUL;
        8'hB0: begin ins = I_ANL_8;  b2 = 1'b1; end
        8'hB2: begin ins = I_CPL_3;  b2 = 1'b1; end
        8'hB3: ins = I_CPL_2;
        8'hB4: begin ins = I_CJNE_2; b2 = 1'b1; b3 = 1'b1; end
        8'hB5: begin ins = I_CJNE_1; b2 = 1'b1; b3 = 1'b1; end
        8'hC0: begin ins = I_PUSH;   b2 = 1'b1; end
        8'hC2: begin ins = I_CLR_3;  b2 = 1'b1; end
        8'hC3: ins = I_CLR_2;
        8'hC4: ins = I_SWAP;
        8'hC5: begin ins = I_XCH_2;  b2 = 1'b1; end
        8'hD0: begin ins = I_POP;    b2 = 1'b1; end
        8'hD2: begin ins = I_SETB_2; b2 = 1'b1; end
        8'hD3: ins = I_SETB_1;
        8'hD4: ins = I_DA;
        8'hD5: begin ins = I_DJNZ_2; b2 = 1'b1; b3 = 1'b1; end
        8'hE0: ins = I_MOVX_2;
        8'hE2, 8'hE3: ins = I_MOVX_1;
        8'hE4: ins = I_CLR_1;
        8'hE5: begin ins = I_MOV_2;  b2 = 1'b1; end
        8'hF0: ins = I_MOVX_4;
        8'hF2, 8'hF3: ins = I_MOVX_3;
        8'hF4: ins = I_CPL_1;
        8'hF5: begin ins = I_MOV_8;  b2 = 1'b1; end
        default: ins = I_UNDEF;   // A5h
      endcase
    end
    op_out = '{op3: b3, op2: b2, ins: ins};
  end

endmodule
