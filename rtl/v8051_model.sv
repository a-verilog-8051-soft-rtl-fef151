// v8051_model: the v8051 soft core, an 8051-compatible microcontroller.
//
// Integrates the controller (v8051_ctr), the opcode decoder (v8051_dec), the
// ALU (v8051_alu), the internal data RAM with its SFRs and I/O ports
// (v8051_ram), the 4 KB program ROM (v8051_rom) and the slow-clock divider
// (v8051_clkdiv). The external data memory is not part of the core: its bus
// (xm_*) is brought out.
//
// Clocking: everything is clocked by clkfast. The divider produces a
// one-in-three clock enable that times the controller, the RAM and the ROM
// output register; the ROM array itself is read on every clkfast edge, which
// gives it the three fast clocks of address hold it needs. One instruction
// takes 17 slow clocks = 51 clkfast periods. rst is synchronous and active
// high; after it is released the controller spends six slow clocks setting
// P0..P3 to FFh and SP to 07h, then fetches from address 0000h.
//
// Ports: pX_in are the pins read by instructions that read port X; pX_out
// are the port latches written by instructions. Outputs are never
// tri-stated, as in the document. cpu_state/exe_state expose the
// controller's one-hot states for monitoring.
module v8051_model
  import v8051_pkg::*;
#(
  parameter string ROM_FILE = "rtl/v8051_rom_init.hex"
) (
  input  logic        clkfast,
  input  logic        rst,
  input  logic [7:0]  p0_in,
  input  logic [7:0]  p1_in,
  input  logic [7:0]  p2_in,
  input  logic [7:0]  p3_in,
  output logic [7:0]  p0_out,
  output logic [7:0]  p1_out,
  output logic [7:0]  p2_out,
  output logic [7:0]  p3_out,
  output logic [15:0] xm_addr,
  output logic [7:0]  xm_wr_data,
  output logic        xm_wr,
  output logic        xm_rd,
  input  logic [7:0]  xm_rd_data,
  output cpu_state_e  cpu_state,
  output exe_state_e  exe_state
);

  logic ce;

  logic [11:0] rom_addr;
  logic        rom_rd;
  logic [7:0]  rom_data;

  logic [7:0]  ram_addr, ram_wr_data, ram_rd_data;
  logic        ram_wr_bit, ram_rd, ram_wr, ram_is_bit, ram_rd_bit;

  logic [7:0]  dec_op_out;
  dec_t        dec_op_in;

  alu_op_e     alu_op;
  logic [7:0]  alu_src_1, alu_src_2, alu_src_3, alu_des_1, alu_des_2;
  logic        alu_src_cy, alu_src_ac, alu_des_cy, alu_des_ac, alu_des_ov;

  v8051_clkdiv #(.DIV(3)) u_clk (
    .clk (clkfast),
    .rst (rst),
    .ce  (ce)
  );

  v8051_ctr u_ctr (
    .clk         (clkfast),
    .ce          (ce),
    .rst         (rst),
    .rom_addr    (rom_addr),
    .rom_rd      (rom_rd),
    .rom_data    (rom_data),
    .ram_addr    (ram_addr),
    .ram_wr_data (ram_wr_data),
    .ram_wr_bit  (ram_wr_bit),
    .ram_rd      (ram_rd),
    .ram_wr      (ram_wr),
    .ram_is_bit  (ram_is_bit),
    .ram_rd_data (ram_rd_data),
    .ram_rd_bit  (ram_rd_bit),
    .dec_op_out  (dec_op_out),
    .dec_op_in   (dec_op_in),
    .alu_op      (alu_op),
    .alu_src_1   (alu_src_1),
    .alu_src_2   (alu_src_2),
    .alu_src_3   (alu_src_3),
    .alu_src_cy  (alu_src_cy),
    .alu_src_ac  (alu_src_ac),
    .alu_des_1   (alu_des_1),
    .alu_des_2   (alu_des_2),
    .alu_des_cy  (alu_des_cy),
    .alu_des_ac  (alu_des_ac),
    .alu_des_ov  (alu_des_ov),
    .xm_addr     (xm_addr),
    .xm_wr_data  (xm_wr_data),
    .xm_wr       (xm_wr),
    .xm_rd       (xm_rd),
    .xm_rd_data  (xm_rd_data),
    .cpu_state   (cpu_state),
    .exe_state   (exe_state)
  );

  v8051_dec u_dec (
    .op_in  (dec_op_out),
    .op_out (dec_op_in)
  );

  v8051_alu u_alu (
    .alu_op (alu_op),
    .src_1  (alu_src_1),
    .src_2  (alu_src_2),
    .src_3  (alu_src_3),
    .src_cy (alu_src_cy),
    .src_ac (alu_src_ac),
    .des_1  (alu_des_1),
    .des_2  (alu_des_2),
    .des_cy (alu_des_cy),
    .des_ac (alu_des_ac),
    .des_ov (alu_des_ov)
  );

  v8051_ram u_ram (
    .clk          (clkfast),
    .ce           (ce),
    .rst          (rst),
    .addr         (ram_addr),
    .in_data      (ram_wr_data),
    .in_bit_data  (ram_wr_bit),
    .rd           (ram_rd),
    .wr           (ram_wr),
    .is_bit_addr  (ram_is_bit),
    .out_data     (ram_rd_data),
    .out_bit_data (ram_rd_bit),
    .p0_in        (p0_in),
    .p1_in        (p1_in),
    .p2_in        (p2_in),
    .p3_in        (p3_in),
    .p0_out       (p0_out),
    .p1_out       (p1_out),
    .p2_out       (p2_out),
    .p3_out       (p3_out)
  );

  v8051_rom #(.ADDR_W(12), .INIT_FILE(ROM_FILE)) u_rom (
    .clk      (clkfast),
    .ce       (ce),
    .rom_rd   (rom_rd),
    .rom_addr (rom_addr),
    .rom_data (rom_data)
  );

endmodule
