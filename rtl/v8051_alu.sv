// v8051_alu: arithmetic and logic unit of the v8051 soft core.
//
// Purely combinational. The controller selects one of sixteen functions with
// the 4-bit alu_op and supplies up to three 8-bit source operands and the
// incoming carry and auxiliary-carry flags; the unit returns two 8-bit results
// and the carry, auxiliary-carry and overflow flags.
//
//   ADD    des_1 = src_1 + src_2 + src_cy        (ADD uses src_cy = 0, ADDC = C)
//   SUB    des_1 = src_1 - src_2 - src_cy        (SUBB)
//   MUL    {des_2,des_1} = src_1 * src_2, ov if the product exceeds 8 bits
//   DIV    des_1 = src_1 / src_2, des_2 = remainder, ov on division by zero
//   DA     decimal adjust of src_1 using src_cy/src_ac
//   NOT/AND/XOR/OR, RL/RLC/RR/RRC on src_1 (RLC/RRC through src_cy)
//   PCSADD {des_2,des_1} = {src_2,src_1} + signed src_3   (relative jumps)
//   PCUADD {des_2,des_1} = {src_2,src_1} + unsigned src_3 (PC increment)
//
// Following the document, flags an operation does not define and the unused
// second result are driven to zero; the controller decides which flags it
// stores. DIV is the restoring shift-subtract algorithm the document gives,
// unrolled into eight stages. Division by zero returns des_1 = FFh,
// des_2 = 00h and ov = 1, the values the document's test table shows.
module v8051_alu
  import v8051_pkg::*;
(
  input  alu_op_e    alu_op,
  input  logic [7:0] src_1,
  input  logic [7:0] src_2,
  input  logic [7:0] src_3,
  input  logic       src_cy,
  input  logic       src_ac,
  output logic [7:0] des_1,
  output logic [7:0] des_2,
  output logic       des_cy,
  output logic       des_ac,
  output logic       des_ov
);

  logic [8:0]  sum9;
  logic [15:0] prod;
  logic [7:0]  quot, rem;
  logic [15:0] pc16;
  logic [8:0]  da_v;

  // Restoring division: shift a dividend bit into the remainder, try to
  // subtract the divisor, keep the difference when it does not go negative.
  always_comb begin
    logic [8:0] r;
    r    = '0;
    quot = '0;
    for (int i = 7; i >= 0; i--) begin
      r = {r[7:0], src_1[i]};
      if (r >= {1'b0, src_2}) begin
        r       = r - {1'b0, src_2};
        quot[i] = 1'b1;
      end
    end
    rem = r[7:0];
  end

  always_comb begin
    des_1  = '0;
    des_2  = '0;
    des_cy = 1'b0;
    des_ac = 1'b0;
    des_ov = 1'b0;
    sum9   = '0;
    prod   = '0;
    pc16   = '0;
    da_v   = '0;
    unique case (alu_op)
      ALU_OPC_NONE: ;
      ALU_OPC_ADD: begin
        sum9   = {1'b0, src_1} + {1'b0, src_2} + 9'(src_cy);
        des_1  = sum9[7:0];
        des_cy = sum9[8];
        des_ac = src_1[4] ^ src_2[4] ^ sum9[4];  // carry/borrow out of bit 3
        des_ov = (src_1[7] == src_2[7]) && (sum9[7] != src_1[7]);
      end
      ALU_OPC_SUB: begin
        sum9   = {1'b0, src_1} - {1'b0, src_2} - 9'(src_cy);
        des_1  = sum9[7:0];
        des_cy = sum9[8];
        des_ac = src_1[4] ^ src_2[4] ^ sum9[4];  // carry/borrow out of bit 3
        des_ov = (src_1[7] != src_2[7]) && (sum9[7] != src_1[7]);
      end
      ALU_OPC_MUL: begin
        prod   = src_1 * src_2;
        des_1  = prod[7:0];
        des_2  = prod[15:8];
        des_ov = |prod[15:8];
      end
      ALU_OPC_DIV: begin
        if (src_2 == 8'h00) begin
          des_1  = 8'hFF;
          des_ov = 1'b1;
        end else begin
          des_1 = quot;
          des_2 = rem;
        end
      end
      ALU_OPC_DA: begin
        da_v = {1'b0, src_1};
        if (da_v[3:0] > 4'd9 || src_ac) da_v = da_v + 9'h006;
        des_cy = src_cy | da_v[8];
        if (da_v[7:4] > 4'd9 || des_cy) da_v = {1'b0, da_v[7:0]} + 9'h060;
        des_cy = des_cy | da_v[8];
        des_1  = da_v[7:0];
      end
      ALU_OPC_NOT: des_1 = ~src_1;
      ALU_OPC_AND: des_1 = src_1 & src_2;
      ALU_OPC_XOR: des_1 = src_1 ^ src_2;
      ALU_OPC_OR:  des_1 = src_1 | src_2;
      ALU_OPC_RL:  des_1 = {src_1[6:0], src_1[7]};
      ALU_OPC_RLC: begin
        des_1  = {src_1[6:0], src_cy};
        des_cy = src_1[7];
      end
      ALU_OPC_RR:  des_1 = {src_1[0], src_1[7:1]};
      ALU_OPC_RRC: begin
        des_1  = {src_cy, src_1[7:1]};
        des_cy = src_1[0];
      end
      ALU_OPC_PCSADD: begin
        pc16  = {src_2, src_1} + {{8{src_3[7]}}, src_3};
        des_1 = pc16[7:0];
        des_2 = pc16[15:8];
      end
      ALU_OPC_PCUADD: begin
        pc16  = {src_2, src_1} + {8'h00, src_3};
        des_1 = pc16[7:0];
        des_2 = pc16[15:8];
      end
      default: ;
    endcase
  end

endmodule
