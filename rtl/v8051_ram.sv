// v8051_ram: internal data memory of the v8051 soft core.
//
// 256-byte internal address space: 128 bytes of data RAM at 00h-7Fh (four
// register banks at 00h-1Fh, bit-addressable bytes at 20h-2Fh, scratch pad at
// 30h-7Fh) and the 21 special function registers of the 8051 in 80h-FFh. The
// eleven SFRs whose address ends in 0h or 8h are bit-addressable. The four
// port latches P0..P3 drive p0_out..p3_out.
//
// Interface: one access per slow clock (clk qualified by ce). With rd set the
// addressed byte is registered into out_data; with is_bit_addr also set, addr
// is a bit address and the addressed bit is registered into out_bit_data
// (out_data then keeps its value). With wr set, in_data is written, or with
// is_bit_addr set, in_bit_data is written to the addressed bit. Read data is
// available in the slow clock that follows the read. Bit address decoding:
// below 80h the byte is 20h + addr[6:3], from 80h up it is {addr[7:3],000};
// the bit number is addr[2:0].
//
// Reset clears the RAM and every SFR to 00h and holds out_data, as the
// document describes; the controller then sets the ports and SP. Choices of
// this design: reading a port address returns the input pins pX_in (the
// written latch value appears only on pX_out); the parity bit PSW.0 reads as
// the even parity of ACC; unused SFR addresses read 00h and ignore writes.
module v8051_ram
  import v8051_pkg::*;
(
  input  logic       clk,
  input  logic       ce,
  input  logic       rst,
  input  logic [7:0] addr,
  input  logic [7:0] in_data,
  input  logic       in_bit_data,
  input  logic       rd,
  input  logic       wr,
  input  logic       is_bit_addr,
  output logic [7:0] out_data,
  output logic       out_bit_data,
  input  logic [7:0] p0_in,
  input  logic [7:0] p1_in,
  input  logic [7:0] p2_in,
  input  logic [7:0] p3_in,
  output logic [7:0] p0_out,
  output logic [7:0] p1_out,
  output logic [7:0] p2_out,
  output logic [7:0] p3_out
);

  localparam int NSFR = 21;

  logic [7:0] iram [128];
  logic [7:0] sfr  [NSFR];

  // Index of an SFR in sfr[], or NSFR when the address holds none.
  function automatic int unsigned sfr_idx(logic [7:0] a);
    unique case (a)
      SFR_P0:   return 0;
      SFR_SP:   return 1;
      SFR_DPL:  return 2;
      SFR_DPH:  return 3;
      SFR_PCON: return 4;
      SFR_TCON: return 5;
      SFR_TMOD: return 6;
      SFR_TL0:  return 7;
      SFR_TL1:  return 8;
      SFR_TH0:  return 9;
      SFR_TH1:  return 10;
      SFR_P1:   return 11;
      SFR_SCON: return 12;
      SFR_SBUF: return 13;
      SFR_P2:   return 14;
      SFR_IE:   return 15;
      SFR_P3:   return 16;
      SFR_IP:   return 17;
      SFR_PSW:  return 18;
      SFR_ACC:  return 19;
      SFR_B:    return 20;
      default:  return NSFR;
    endcase
  endfunction

  // Byte address of the access: the byte itself, or the byte holding the bit.
  logic [7:0]  byte_addr;
  logic [2:0]  bit_no;
  int unsigned sidx;
  logic [7:0]  rd_byte;

  always_comb begin
    if (is_bit_addr) begin
      byte_addr = addr[7] ? {addr[7:3], 3'b000} : {4'b0010, addr[6:3]};
      bit_no    = addr[2:0];
    end else begin
      byte_addr = addr;
      bit_no    = 3'd0;
    end
    sidx = sfr_idx(byte_addr);
    // Value seen by a read.
    if (!byte_addr[7])          rd_byte = iram[byte_addr[6:0]];
    else if (byte_addr == SFR_P0) rd_byte = p0_in;
    else if (byte_addr == SFR_P1) rd_byte = p1_in;
    else if (byte_addr == SFR_P2) rd_byte = p2_in;
    else if (byte_addr == SFR_P3) rd_byte = p3_in;
    else if (byte_addr == SFR_PSW) rd_byte = {sfr[18][7:1], ^sfr[19]};
    else if (sidx < NSFR)       rd_byte = sfr[sidx];
    else                        rd_byte = 8'h00;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 128; i++) iram[i] <= 8'h00;
      for (int i = 0; i < NSFR; i++) sfr[i] <= 8'h00;
    end else if (ce) begin
      if (wr) begin
        if (!byte_addr[7]) begin
          if (is_bit_addr) iram[byte_addr[6:0]][bit_no] <= in_bit_data;
          else             iram[byte_addr[6:0]]         <= in_data;
        end else if (sidx < NSFR) begin
          if (is_bit_addr) sfr[sidx][bit_no] <= in_bit_data;
          else             sfr[sidx]         <= in_data;
        end
      end
    end
  end

  // Read port: holds its value during reset and when not reading.
  always_ff @(posedge clk) begin
    if (!rst && ce && rd) begin
      if (is_bit_addr) out_bit_data <= rd_byte[bit_no];
      else             out_data     <= rd_byte;
    end
  end

  // One access per slow clock: a read and a write are never requested together.
  always_ff @(posedge clk) begin
    if (!rst && ce) assert (!(rd && wr)) else $error("RAM read and write requested together");
  end

  assign p0_out = sfr[0];
  assign p1_out = sfr[11];
  assign p2_out = sfr[14];
  assign p3_out = sfr[16];

endmodule
