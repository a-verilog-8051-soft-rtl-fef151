// v8051_ctr: controller of the v8051 soft core.
//
// A two-level one-hot state machine. The outer CPU_STATE selects the phase:
// CS_0 reset sequence, CS_1 (reserved for interrupts, one idle clock), CS_2
// fetch and decode, CS_3 execute. Inside a phase the EXE_STATE steps through
// ES_0..ES_7, one step per slow clock. CS_0 takes six steps (ES_0..ES_5: P0,
// P1, P2, P3 set to FFh, SP set to 07h); CS_2 and CS_3 always take all eight,
// so every instruction takes 1 + 8 + 8 = 17 slow clocks, whatever its type.
//
// Fetch (CS_2): the three bytes at PC, PC+1, PC+2 are read from ROM into
// op1..op3 and PSW and ACC are read from the internal RAM into local copies.
// op1 goes to the decoder; in ES_4 the ALU (PCUADD) advances PC by
// 1 + dec[7] + dec[8], the instruction's length.
//
// Execute (CS_3) uses a fixed slot plan for every instruction:
//   ES_0  pre-read: Ri for @Ri forms, SP for stack forms, DPL for DPTR forms
//   ES_1  operand read: Rn, direct byte, @Ri, @SP, bit, B or DPH
//   ES_2  second read: @SP-1 (RET), MOVX read, MOVC ROM read (ALU PCUADD)
//   ES_3  ALU operation; results, new PSW and branch decision are registered
//   ES_4  first write (main destination, @SP+1, MOVX write)
//   ES_5  second write (XCH partner, B, SP, @SP+2, DPTR half)
//   ES_6  PSW (or SP for calls) written back; PC updated (ALU PCSADD for
//         relative jumps, PCUADD for JMP @A+DPTR)
//   ES_7  ALU inputs cleared; back to CS_1
// The internal RAM and the external memory answer a read in the next slow
// clock, the ROM likewise; the controller's RAM/ROM/ALU outputs are
// combinational functions of the state and of its registers.
//
// Follows the document: the phase and step structure, the state encodings
// (one-hot), the reset sequence, the uniform 17-clock instruction time, the
// use of the ALU for PC arithmetic, the decoder interface. The exact slot of
// each read and write inside CS_2/CS_3 is this design's own plan (the
// document details only ACALL, ADD A,#data and RLC A). Interrupts are not
// implemented; RETI behaves as RET. MOVX @Ri puts 00h on the upper address
// byte. SP increments and decrements use small adders outside the ALU.
module v8051_ctr
  import v8051_pkg::*;
(
  input  logic        clk,
  input  logic        ce,
  input  logic        rst,
  // program memory
  output logic [11:0] rom_addr,
  output logic        rom_rd,
  input  logic [7:0]  rom_data,
  // internal data memory and SFRs
  output logic [7:0]  ram_addr,
  output logic [7:0]  ram_wr_data,
  output logic        ram_wr_bit,
  output logic        ram_rd,
  output logic        ram_wr,
  output logic        ram_is_bit,
  input  logic [7:0]  ram_rd_data,
  input  logic        ram_rd_bit,
  // decoder
  output logic [7:0]  dec_op_out,
  input  dec_t        dec_op_in,
  // ALU
  output alu_op_e     alu_op,
  output logic [7:0]  alu_src_1,
  output logic [7:0]  alu_src_2,
  output logic [7:0]  alu_src_3,
  output logic        alu_src_cy,
  output logic        alu_src_ac,
  input  logic [7:0]  alu_des_1,
  input  logic [7:0]  alu_des_2,
  input  logic        alu_des_cy,
  input  logic        alu_des_ac,
  input  logic        alu_des_ov,
  // external data memory
  output logic [15:0] xm_addr,
  output logic [7:0]  xm_wr_data,
  output logic        xm_wr,
  output logic        xm_rd,
  input  logic [7:0]  xm_rd_data,
  // state, for monitoring
  output cpu_state_e  cpu_state,
  output exe_state_e  exe_state
);

  cpu_state_e cs;
  exe_state_e es;

  logic [15:0] pc;
  logic [7:0]  op1, op2, op3;
  logic [7:0]  psw, acc;
  logic [7:0]  x0;      // pre-read value: Ri contents, SP or DPL
  logic [7:0]  opnd;    // ES_1 read: operand byte, @SP, B or DPH
  logic        obit;    // ES_1 read: operand bit
  logic [7:0]  opnd2;   // ES_2 read: @SP-1, MOVX or MOVC data
  logic [7:0]  res1, res2;
  logic [7:0]  npsw;
  logic        take;    // branch taken

  instr_e ins;
  assign ins        = dec_op_in.ins;
  assign dec_op_out = op1;
  assign cpu_state  = cs;
  assign exe_state  = es;

  logic cy;
  assign cy = psw[7];

  logic [7:0] rn_a, ri_a;
  assign rn_a = {3'b000, psw[4:3], op1[2:0]};
  assign ri_a = {3'b000, psw[4:3], 2'b00, op1[0]};

  // ---------------------------------------------------------------------
  // Instruction classes
  // ---------------------------------------------------------------------
  logic pre_ri, pre_sp, pre_dp;
  logic rd_rn, rd_dir, rd_ind, rd_bit, rd_b;
  logic flag_wr;     // instruction updates PSW flags in ES_6
  logic is_call;
  logic rel_op2, rel_op3;

  always_comb begin
    pre_ri = ins inside {I_ADD_3, I_ADDC_3, I_ANL_3, I_ORL_3, I_XRL_3, I_SUBB_3,
                         I_CJNE_4, I_DEC_4, I_INC_4, I_MOV_3, I_MOV_11, I_MOV_13,
                         I_MOV_14, I_MOV_15, I_MOVX_1, I_MOVX_3, I_XCH_3, I_XCHD};
    pre_sp = ins inside {I_ACALL, I_LCALL, I_PUSH, I_POP, I_RET, I_RETI};
    pre_dp = ins inside {I_MOVX_2, I_MOVX_4, I_MOVC_1, I_JMP, I_INC_5};
    rd_rn  = ins inside {I_ADD_1, I_ADDC_1, I_ANL_1, I_ORL_1, I_XRL_1, I_SUBB_1,
                         I_DEC_2, I_INC_2, I_DJNZ_1, I_MOV_1, I_MOV_9, I_XCH_1,
                         I_CJNE_3};
    rd_dir = ins inside {I_ADD_2, I_ADDC_2, I_ANL_2, I_ANL_5, I_ANL_6, I_ORL_2,
                         I_ORL_5, I_ORL_6, I_XRL_2, I_XRL_5, I_XRL_6, I_SUBB_2,
                         I_CJNE_1, I_DEC_3, I_INC_3, I_DJNZ_2, I_MOV_2, I_MOV_6,
                         I_MOV_10, I_MOV_14, I_PUSH, I_XCH_2};
    rd_ind = ins inside {I_ADD_3, I_ADDC_3, I_ANL_3, I_ORL_3, I_XRL_3, I_SUBB_3,
                         I_CJNE_4, I_DEC_4, I_INC_4, I_MOV_3, I_MOV_11, I_XCH_3,
                         I_XCHD, I_POP, I_RET, I_RETI};
    rd_bit = ins inside {I_ANL_7, I_ANL_8, I_ORL_7, I_ORL_8, I_CPL_3, I_MOV_16,
                         I_JB, I_JNB, I_JBC};
    rd_b   = ins inside {I_MUL, I_DIV};
    flag_wr = ins inside {I_ADD_1, I_ADD_2, I_ADD_3, I_ADD_4, I_ADDC_1, I_ADDC_2,
                          I_ADDC_3, I_ADDC_4, I_SUBB_1, I_SUBB_2, I_SUBB_3,
                          I_SUBB_4, I_DA, I_MUL, I_DIV, I_RLC, I_RRC, I_CJNE_1,
                          I_CJNE_2, I_CJNE_3, I_CJNE_4, I_CLR_2, I_CPL_2,
                          I_SETB_1, I_ANL_7, I_ANL_8, I_ORL_7, I_ORL_8, I_MOV_16};
    is_call = ins inside {I_ACALL, I_LCALL};
    rel_op2 = ins inside {I_SJMP, I_JC, I_JNC, I_JZ, I_JNZ, I_DJNZ_1};
    rel_op3 = ins inside {I_JB, I_JNB, I_JBC, I_CJNE_1, I_CJNE_2, I_CJNE_3,
                          I_CJNE_4, I_DJNZ_2};
  end

  // Operand of the accumulator forms: immediate for the #data form.
  logic [7:0] aval;
  always_comb begin
    if (ins inside {I_ADD_4, I_ADDC_4, I_SUBB_4, I_ANL_4, I_ORL_4, I_XRL_4})
      aval = op2;
    else
      aval = opnd;
  end

  // ES_2-read data as it arrives in ES_3.
  logic [7:0] cur2;
  always_comb begin
    if (ins inside {I_MOVX_1, I_MOVX_2})      cur2 = xm_rd_data;
    else if (ins inside {I_MOVC_1, I_MOVC_2}) cur2 = rom_data;
    else                                      cur2 = ram_rd_data;
  end

  // ---------------------------------------------------------------------
  // ES_3 computation: ALU set-up and results
  // ---------------------------------------------------------------------
  alu_op_e    x_op;
  logic [7:0] x_s1, x_s2, x_s3;
  logic       x_cy;
  logic [7:0] n_res1, n_res2, n_psw;
  logic       n_take;

  always_comb begin
    x_op   = ALU_OPC_NONE;
    x_s1   = '0;
    x_s2   = '0;
    x_s3   = '0;
    x_cy   = 1'b0;
    n_res1 = alu_des_1;
    n_res2 = alu_des_2;
    n_psw  = psw;
    n_take = 1'b0;
    case (ins)
      I_ADD_1, I_ADD_2, I_ADD_3, I_ADD_4,
      I_ADDC_1, I_ADDC_2, I_ADDC_3, I_ADDC_4,
      I_SUBB_1, I_SUBB_2, I_SUBB_3, I_SUBB_4: begin
        x_op = (ins inside {I_SUBB_1, I_SUBB_2, I_SUBB_3, I_SUBB_4}) ? ALU_OPC_SUB
                                                                     : ALU_OPC_ADD;
        x_s1 = acc;
        x_s2 = aval;
        x_cy = (ins inside {I_ADD_1, I_ADD_2, I_ADD_3, I_ADD_4}) ? 1'b0 : cy;
        n_psw[7] = alu_des_cy;
        n_psw[6] = alu_des_ac;
        n_psw[2] = alu_des_ov;
      end
      I_ANL_1, I_ANL_2, I_ANL_3, I_ANL_4,
      I_ORL_1, I_ORL_2, I_ORL_3, I_ORL_4,
      I_XRL_1, I_XRL_2, I_XRL_3, I_XRL_4,
      I_ANL_5, I_ANL_6, I_ORL_5, I_ORL_6, I_XRL_5, I_XRL_6: begin
        if (ins inside {I_ANL_1, I_ANL_2, I_ANL_3, I_ANL_4, I_ANL_5, I_ANL_6})
          x_op = ALU_OPC_AND;
        else if (ins inside {I_ORL_1, I_ORL_2, I_ORL_3, I_ORL_4, I_ORL_5, I_ORL_6})
          x_op = ALU_OPC_OR;
        else
          x_op = ALU_OPC_XOR;
        if (ins inside {I_ANL_5, I_ORL_5, I_XRL_5}) begin
          x_s1 = opnd; x_s2 = acc;
        end else if (ins inside {I_ANL_6, I_ORL_6, I_XRL_6}) begin
          x_s1 = opnd; x_s2 = op3;
        end else begin
          x_s1 = acc;  x_s2 = aval;
        end
      end
      I_ANL_7: n_psw[7] = cy & obit;
      I_ANL_8: n_psw[7] = cy & ~obit;
      I_ORL_7: n_psw[7] = cy | obit;
      I_ORL_8: n_psw[7] = cy | ~obit;
      I_CJNE_1, I_CJNE_2, I_CJNE_3, I_CJNE_4: begin
        x_op = ALU_OPC_SUB;
        x_s1 = (ins inside {I_CJNE_1, I_CJNE_2}) ? acc : opnd;
        x_s2 = (ins == I_CJNE_1) ? opnd : op2;
        n_psw[7] = alu_des_cy;
        n_take   = (x_s1 != x_s2);
      end
      I_CLR_1:  n_res1 = 8'h00;
      I_CLR_2:  n_psw[7] = 1'b0;
      I_CLR_3:  n_res1 = 8'h00;
      I_CPL_1:  begin x_op = ALU_OPC_NOT; x_s1 = acc; end
      I_CPL_2:  n_psw[7] = ~cy;
      I_CPL_3:  n_res1 = {7'b0, ~obit};
      I_DA: begin
        x_op = ALU_OPC_DA; x_s1 = acc; x_cy = cy;
        n_psw[7] = alu_des_cy;
      end
      I_DEC_1, I_DEC_2, I_DEC_3, I_DEC_4,
      I_INC_1, I_INC_2, I_INC_3, I_INC_4,
      I_DJNZ_1, I_DJNZ_2: begin
        x_op = (ins inside {I_INC_1, I_INC_2, I_INC_3, I_INC_4}) ? ALU_OPC_ADD
                                                                 : ALU_OPC_SUB;
        x_s1 = (ins inside {I_DEC_1, I_INC_1}) ? acc : opnd;
        x_s2 = 8'h01;
        n_take = (alu_des_1 != 8'h00);
      end
      I_INC_5: begin
        x_op = ALU_OPC_PCUADD; x_s1 = x0; x_s2 = opnd; x_s3 = 8'h01;
      end
      I_MUL, I_DIV: begin
        x_op = (ins == I_MUL) ? ALU_OPC_MUL : ALU_OPC_DIV;
        x_s1 = acc; x_s2 = opnd;
        n_psw[7] = 1'b0;
        n_psw[2] = alu_des_ov;
      end
      I_JB, I_JBC: n_take = obit;
      I_JNB:       n_take = ~obit;
      I_JC:        n_take = cy;
      I_JNC:       n_take = ~cy;
      I_JZ:        n_take = (acc == 8'h00);
      I_JNZ:       n_take = (acc != 8'h00);
      I_SJMP, I_AJMP, I_LJMP, I_ACALL, I_LCALL, I_JMP, I_RET, I_RETI:
        n_take = 1'b1;
      I_MOV_1, I_MOV_2, I_MOV_3, I_MOV_6, I_MOV_9, I_MOV_10, I_MOV_11,
      I_MOV_14: n_res1 = opnd;
      I_MOV_4, I_MOV_7, I_MOV_15: n_res1 = op2;
      I_MOV_5, I_MOV_8, I_MOV_13: n_res1 = acc;
      I_MOV_12: n_res1 = op3;
      I_MOV_16: n_psw[7] = obit;
      I_MOV_17: n_res1 = {7'b0, cy};
      I_MOV_18: begin n_res1 = op2; n_res2 = op3; end
      I_MOVC_1, I_MOVC_2, I_MOVX_1, I_MOVX_2: n_res1 = cur2;
      I_POP:  begin n_res1 = opnd; n_res2 = x0 - 8'd1; end
      I_PUSH: begin n_res1 = opnd; n_res2 = x0 + 8'd1; end
      I_RL, I_RLC, I_RR, I_RRC: begin
        unique case (ins)
          I_RL:    x_op = ALU_OPC_RL;
          I_RLC:   x_op = ALU_OPC_RLC;
          I_RR:    x_op = ALU_OPC_RR;
          default: x_op = ALU_OPC_RRC;
        endcase
        x_s1 = acc; x_cy = cy;
        if (ins inside {I_RLC, I_RRC}) n_psw[7] = alu_des_cy;
      end
      I_SETB_1: n_psw[7] = 1'b1;
      I_SETB_2: n_res1 = 8'h01;
      I_SWAP:   n_res1 = {acc[3:0], acc[7:4]};
      I_XCH_1, I_XCH_2, I_XCH_3: begin n_res1 = acc; n_res2 = opnd; end
      I_XCHD: begin
        n_res1 = {opnd[7:4], acc[3:0]};
        n_res2 = {acc[7:4], opnd[3:0]};
      end
      default: ;
    endcase
    // Stack results of calls and returns.
    if (is_call) begin
      n_res1 = pc[7:0];
      n_res2 = pc[15:8];
    end
    if (ins inside {I_RET, I_RETI}) n_res1 = x0 - 8'd2;
  end

  // ---------------------------------------------------------------------
  // Write plan for ES_4 (w1) and ES_5 (w2)
  // ---------------------------------------------------------------------
  logic       w1_en, w1_bit, w1_xm;
  logic [7:0] w1_addr;
  logic       w2_en;
  logic [7:0] w2_addr;

  always_comb begin
    w1_en = 1'b1; w1_bit = 1'b0; w1_xm = 1'b0; w1_addr = SFR_ACC;
    case (ins)
      I_ADD_1, I_ADD_2, I_ADD_3, I_ADD_4, I_ADDC_1, I_ADDC_2, I_ADDC_3, I_ADDC_4,
      I_SUBB_1, I_SUBB_2, I_SUBB_3, I_SUBB_4,
      I_ANL_1, I_ANL_2, I_ANL_3, I_ANL_4, I_ORL_1, I_ORL_2, I_ORL_3, I_ORL_4,
      I_XRL_1, I_XRL_2, I_XRL_3, I_XRL_4, I_CLR_1, I_CPL_1, I_DA, I_DEC_1,
      I_INC_1, I_MUL, I_DIV, I_MOV_1, I_MOV_2, I_MOV_3, I_MOV_4, I_MOVC_1,
      I_MOVC_2, I_MOVX_1, I_MOVX_2, I_RL, I_RLC, I_RR, I_RRC, I_SWAP:
        w1_addr = SFR_ACC;
      I_MOV_5, I_MOV_6, I_MOV_7, I_DEC_2, I_INC_2, I_DJNZ_1, I_XCH_1:
        w1_addr = rn_a;
      I_ANL_5, I_ANL_6, I_ORL_5, I_ORL_6, I_XRL_5, I_XRL_6, I_DEC_3, I_INC_3,
      I_DJNZ_2, I_MOV_8, I_MOV_9, I_MOV_11, I_MOV_12, I_POP, I_XCH_2:
        w1_addr = op2;
      I_MOV_10:
        w1_addr = op3;
      I_DEC_4, I_INC_4, I_MOV_13, I_MOV_14, I_MOV_15, I_XCH_3, I_XCHD:
        w1_addr = x0;
      I_CLR_3, I_CPL_3, I_SETB_2, I_MOV_17: begin
        w1_addr = op2; w1_bit = 1'b1;
      end
      I_JBC: begin
        w1_addr = op2; w1_bit = 1'b1; w1_en = take;
      end
      I_PUSH, I_ACALL, I_LCALL: w1_addr = x0 + 8'd1;
      I_RET, I_RETI:            w1_addr = SFR_SP;
      I_INC_5:                  w1_addr = SFR_DPL;
      I_MOV_18:                 w1_addr = SFR_DPH;
      I_MOVX_3, I_MOVX_4: begin w1_en = 1'b0; w1_xm = 1'b1; end
      default: w1_en = 1'b0;
    endcase

    w2_en = 1'b1; w2_addr = SFR_ACC;
    case (ins)
      I_XCH_1, I_XCH_2, I_XCH_3, I_XCHD: w2_addr = SFR_ACC;
      I_MUL, I_DIV:                      w2_addr = SFR_B;
      I_PUSH, I_POP:                     w2_addr = SFR_SP;
      I_ACALL, I_LCALL:                  w2_addr = x0 + 8'd2;
      I_INC_5:                           w2_addr = SFR_DPH;
      I_MOV_18:                          w2_addr = SFR_DPL;
      default:                           w2_en = 1'b0;
    endcase
  end

  // ---------------------------------------------------------------------
  // Outputs to memories and ALU, per phase and step
  // ---------------------------------------------------------------------
  logic [7:0] rel;
  assign rel = rel_op3 ? op3 : op2;

  logic [11:0] fetch_addr;

  always_comb begin
    rom_addr    = '0;
    rom_rd      = 1'b0;
    ram_addr    = '0;
    ram_wr_data = '0;
    ram_wr_bit  = 1'b0;
    ram_rd      = 1'b0;
    ram_wr      = 1'b0;
    ram_is_bit  = 1'b0;
    alu_op      = ALU_OPC_NONE;
    alu_src_1   = '0;
    alu_src_2   = '0;
    alu_src_3   = '0;
    alu_src_cy  = 1'b0;
    alu_src_ac  = 1'b0;
    xm_addr     = '0;
    xm_wr_data  = '0;
    xm_wr       = 1'b0;
    xm_rd       = 1'b0;
    fetch_addr  = pc[11:0];

    unique case (cs)
      CS_0: begin
        ram_wr      = 1'b1;
        ram_wr_data = 8'hFF;
        unique case (es)
          ES_0: ram_addr = SFR_P0;
          ES_1: ram_addr = SFR_P1;
          ES_2: ram_addr = SFR_P2;
          ES_3: ram_addr = SFR_P3;
          ES_4: begin ram_addr = SFR_SP; ram_wr_data = 8'h07; end
          default: ram_wr = 1'b0;
        endcase
      end
      CS_1: ;
      CS_2: begin
        unique case (es)
          ES_0: begin fetch_addr = pc[11:0];        rom_rd = 1'b1; end
          ES_1: begin
            fetch_addr = pc[11:0] + 12'd1; rom_rd = 1'b1;
            ram_addr = SFR_PSW; ram_rd = 1'b1;
          end
          ES_2: begin
            fetch_addr = pc[11:0] + 12'd2; rom_rd = 1'b1;
            ram_addr = SFR_ACC; ram_rd = 1'b1;
          end
          ES_4: begin
            alu_op    = ALU_OPC_PCUADD;
            alu_src_1 = pc[7:0];
            alu_src_2 = pc[15:8];
            alu_src_3 = 8'd1 + 8'(dec_op_in.op2) + 8'(dec_op_in.op3);
          end
          default: ;
        endcase
        rom_addr = fetch_addr;
      end
      CS_3: begin
        unique case (es)
          ES_0: begin
            ram_rd = pre_ri | pre_sp | pre_dp;
            if (pre_ri)      ram_addr = ri_a;
            else if (pre_sp) ram_addr = SFR_SP;
            else             ram_addr = SFR_DPL;
          end
          ES_1: begin
            ram_rd = rd_rn | rd_dir | rd_ind | rd_bit | rd_b | pre_dp;
            if (rd_rn)       ram_addr = rn_a;
            else if (rd_dir) ram_addr = op2;
            else if (rd_ind) ram_addr = ram_rd_data;
            else if (rd_bit) begin ram_addr = op2; ram_is_bit = 1'b1; end
            else if (rd_b)   ram_addr = SFR_B;
            else             ram_addr = SFR_DPH;
          end
          ES_2: begin
            if (ins inside {I_RET, I_RETI}) begin
              ram_rd = 1'b1; ram_addr = x0 - 8'd1;
            end
            if (ins == I_MOVX_1) begin
              xm_rd = 1'b1; xm_addr = {8'h00, x0};
            end
            if (ins == I_MOVX_2) begin
              xm_rd = 1'b1; xm_addr = {ram_rd_data, x0};
            end
            if (ins inside {I_MOVC_1, I_MOVC_2}) begin
              alu_op    = ALU_OPC_PCUADD;
              alu_src_1 = (ins == I_MOVC_1) ? x0 : pc[7:0];
              alu_src_2 = (ins == I_MOVC_1) ? ram_rd_data : pc[15:8];
              alu_src_3 = acc;
              rom_rd    = 1'b1;
              rom_addr  = {alu_des_2[3:0], alu_des_1};
            end
          end
          ES_3: begin
            alu_op     = x_op;
            alu_src_1  = x_s1;
            alu_src_2  = x_s2;
            alu_src_3  = x_s3;
            alu_src_cy = x_cy;
            alu_src_ac = psw[6];
          end
          ES_4: begin
            ram_wr      = w1_en;
            ram_addr    = w1_addr;
            ram_is_bit  = w1_bit;
            ram_wr_data = res1;
            ram_wr_bit  = res1[0];
            if (w1_xm) begin
              xm_wr      = 1'b1;
              xm_wr_data = acc;
              xm_addr    = (ins == I_MOVX_3) ? {8'h00, x0} : {opnd, x0};
            end
          end
          ES_5: begin
            ram_wr      = w2_en;
            ram_addr    = w2_addr;
            ram_wr_data = res2;
          end
          ES_6: begin
            if (is_call) begin
              ram_wr = 1'b1; ram_addr = SFR_SP; ram_wr_data = x0 + 8'd2;
            end else if (flag_wr) begin
              ram_wr = 1'b1; ram_addr = SFR_PSW; ram_wr_data = npsw;
            end
            if (take && (rel_op2 || rel_op3)) begin
              alu_op    = ALU_OPC_PCSADD;
              alu_src_1 = pc[7:0];
              alu_src_2 = pc[15:8];
              alu_src_3 = rel;
            end else if (ins == I_JMP) begin
              alu_op    = ALU_OPC_PCUADD;
              alu_src_1 = x0;
              alu_src_2 = opnd;
              alu_src_3 = acc;
            end
          end
          default: ;   // ES_7: all ALU inputs at zero
        endcase
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------------
  // State and registers
  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      cs    <= CS_0;
      es    <= ES_0;
      pc    <= '0;
      op1   <= '0;
      op2   <= '0;
      op3   <= '0;
      psw   <= '0;
      acc   <= '0;
      x0    <= '0;
      opnd  <= '0;
      obit  <= 1'b0;
      opnd2 <= '0;
      res1  <= '0;
      res2  <= '0;
      npsw  <= '0;
      take  <= 1'b0;
    end else if (ce) begin
      es <= exe_state_e'({es[6:0], es[7]});   // next step by default
      unique case (cs)
        CS_0: if (es == ES_5) begin es <= ES_0; cs <= CS_1; end
        CS_1: begin es <= ES_0; cs <= CS_2; end
        CS_2: begin
          unique case (es)
            ES_1: op1 <= rom_data;
            ES_2: begin op2 <= rom_data; psw <= ram_rd_data; end
            ES_3: begin op3 <= rom_data; acc <= ram_rd_data; end
            ES_4: pc <= {alu_des_2, alu_des_1};
            ES_7: cs <= CS_3;
            default: ;
          endcase
        end
        CS_3: begin
          unique case (es)
            ES_1: x0 <= ram_rd_data;
            ES_2: begin opnd <= ram_rd_data; obit <= ram_rd_bit; end
            ES_3: begin
              opnd2 <= cur2;
              res1  <= n_res1;
              res2  <= n_res2;
              npsw  <= n_psw;
              take  <= n_take;
            end
            ES_6: begin
              if (take) begin
                if (rel_op2 || rel_op3 || ins == I_JMP)
                  pc <= {alu_des_2, alu_des_1};
                else if (ins inside {I_AJMP, I_ACALL})
                  pc <= {pc[15:11], op1[7:5], op2};
                else if (ins inside {I_LJMP, I_LCALL})
                  pc <= {op2, op3};
                else if (ins inside {I_RET, I_RETI})
                  pc <= {opnd, opnd2};
              end
            end
            ES_7: cs <= CS_1;
            default: ;
          endcase
        end
        default: begin cs <= CS_0; es <= ES_0; end
      endcase
    end
  end

  // Both state registers must stay one-hot.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (cs != 0 && (cs & (cs - 1)) == 0) else $error("CPU_STATE not one-hot");
      assert (es != 0 && (es & (es - 1)) == 0) else $error("EXE_STATE not one-hot");
    end
  end

endmodule
