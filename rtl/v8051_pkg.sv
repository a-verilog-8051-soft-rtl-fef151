// v8051_pkg: types and constants shared by the v8051 soft core.
//
// Holds the two one-hot state encodings of the controller (CPU_STATES and
// EXE_STATES), the 4-bit ALU function codes, the 7-bit instruction pointer
// produced by the decoder, the decoder output bundle and the addresses of the
// special function registers (SFRs).
//
// The ALU codes and the names and order of the 111 instruction pointers follow
// the document (the pointer is the index of the instruction in the usual
// alphabetical 8051 instruction list, e.g. ADD_4 = 04h, MOVC_1 = 45h,
// NOP = 4Ch, RLC = 5Ah). The value 6Fh for the one undefined opcode (A5h) and
// the exact bit patterns of the one-hot states are choices of this design.
package v8051_pkg;

  // Controller phases, one-hot.
  typedef enum logic [3:0] {
    CS_0 = 4'b0001,  // reset cycle: ports to FFh, SP to 07h
    CS_1 = 4'b0010,  // reserved for interrupts: one idle clock
    CS_2 = 4'b0100,  // fetch and decode
    CS_3 = 4'b1000   // execute
  } cpu_state_e;

  // Steps inside a phase, one-hot; one step per slow clock.
  typedef enum logic [7:0] {
    ES_0 = 8'b0000_0001,
    ES_1 = 8'b0000_0010,
    ES_2 = 8'b0000_0100,
    ES_3 = 8'b0000_1000,
    ES_4 = 8'b0001_0000,
    ES_5 = 8'b0010_0000,
    ES_6 = 8'b0100_0000,
    ES_7 = 8'b1000_0000
  } exe_state_e;

  // ALU function select (Table of ALU operations).
  typedef enum logic [3:0] {
    ALU_OPC_NONE   = 4'h0,
    ALU_OPC_ADD    = 4'h1,
    ALU_OPC_SUB    = 4'h2,
    ALU_OPC_MUL    = 4'h3,
    ALU_OPC_DIV    = 4'h4,
    ALU_OPC_DA     = 4'h5,
    ALU_OPC_NOT    = 4'h6,
    ALU_OPC_AND    = 4'h7,
    ALU_OPC_XOR    = 4'h8,
    ALU_OPC_OR     = 4'h9,
    ALU_OPC_RL     = 4'hA,
    ALU_OPC_RLC    = 4'hB,
    ALU_OPC_RR     = 4'hC,
    ALU_OPC_RRC    = 4'hD,
    ALU_OPC_PCSADD = 4'hE,
    ALU_OPC_PCUADD = 4'hF
  } alu_op_e;

  // Instruction pointer: one value per 8051 instruction form.
  typedef enum logic [6:0] {
    I_ACALL,
    I_ADD_1, I_ADD_2, I_ADD_3, I_ADD_4,
    I_ADDC_1, I_ADDC_2, I_ADDC_3, I_ADDC_4,
    I_AJMP,
    I_ANL_1, I_ANL_2, I_ANL_3, I_ANL_4, I_ANL_5, I_ANL_6, I_ANL_7, I_ANL_8,
    I_CJNE_1, I_CJNE_2, I_CJNE_3, I_CJNE_4,
    I_CLR_1, I_CLR_2, I_CLR_3,
    I_CPL_1, I_CPL_2, I_CPL_3,
    I_DA,
    I_DEC_1, I_DEC_2, I_DEC_3, I_DEC_4,
    I_DIV,
    I_DJNZ_1, I_DJNZ_2,
    I_INC_1, I_INC_2, I_INC_3, I_INC_4, I_INC_5,
    I_JB, I_JBC, I_JC, I_JMP, I_JNB, I_JNC, I_JNZ, I_JZ,
    I_LCALL, I_LJMP,
    I_MOV_1, I_MOV_2, I_MOV_3, I_MOV_4, I_MOV_5, I_MOV_6, I_MOV_7, I_MOV_8,
    I_MOV_9, I_MOV_10, I_MOV_11, I_MOV_12, I_MOV_13, I_MOV_14, I_MOV_15,
    I_MOV_16, I_MOV_17, I_MOV_18,
    I_MOVC_1, I_MOVC_2,
    I_MOVX_1, I_MOVX_2, I_MOVX_3, I_MOVX_4,
    I_MUL,
    I_NOP,
    I_ORL_1, I_ORL_2, I_ORL_3, I_ORL_4, I_ORL_5, I_ORL_6, I_ORL_7, I_ORL_8,
    I_POP, I_PUSH, I_RET, I_RETI,
    I_RL, I_RLC, I_RR, I_RRC,
    I_SETB_1, I_SETB_2,
    I_SJMP,
    I_SUBB_1, I_SUBB_2, I_SUBB_3, I_SUBB_4,
    I_SWAP,
    I_XCH_1, I_XCH_2, I_XCH_3,
    I_XCHD,
    I_XRL_1, I_XRL_2, I_XRL_3, I_XRL_4, I_XRL_5, I_XRL_6,
    I_UNDEF            // 6Fh: opcode A5h, executed as NOP
  } instr_e;

  // Decoder output: {needs 3rd byte, needs 2nd byte, instruction pointer}.
  typedef struct packed {
    logic   op3;
    logic   op2;
    instr_e ins;
  } dec_t;

  // SFR addresses.
  localparam logic [7:0] SFR_P0   = 8'h80;
  localparam logic [7:0] SFR_SP   = 8'h81;
  localparam logic [7:0] SFR_DPL  = 8'h82;
  localparam logic [7:0] SFR_DPH  = 8'h83;
  localparam logic [7:0] SFR_PCON = 8'h87;
  localparam logic [7:0] SFR_TCON = 8'h88;
  localparam logic [7:0] SFR_TMOD = 8'h89;
  localparam logic [7:0] SFR_TL0  = 8'h8A;
  localparam logic [7:0] SFR_TL1  = 8'h8B;
  localparam logic [7:0] SFR_TH0  = 8'h8C;
  localparam logic [7:0] SFR_TH1  = 8'h8D;
  localparam logic [7:0] SFR_P1   = 8'h90;
  localparam logic [7:0] SFR_SCON = 8'h98;
  localparam logic [7:0] SFR_SBUF = 8'h99;
  localparam logic [7:0] SFR_P2   = 8'hA0;
  localparam logic [7:0] SFR_IE   = 8'hA8;
  localparam logic [7:0] SFR_P3   = 8'hB0;
  localparam logic [7:0] SFR_IP   = 8'hB8;
  localparam logic [7:0] SFR_PSW  = 8'hD0;
  localparam logic [7:0] SFR_ACC  = 8'hE0;
  localparam logic [7:0] SFR_B    = 8'hF0;

endpackage
