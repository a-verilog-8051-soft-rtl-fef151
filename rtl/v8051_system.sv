// v8051_system: the v8051 soft core with its external data memory attached.
//
// Top level. One v8051_model core and one v8051_xram (64 KB, 16 address
// lines) on the core's MOVX bus, so MOVX reads and writes reach real storage.
// The four 8-bit I/O ports (32 lines) are the only connection to the outside,
// plus the core's one-hot CPU_STATE/EXE_STATE for monitoring. Clock clkfast
// (the core divides it by three internally), synchronous active-high reset.
// The program is the hex file named by ROM_FILE, loaded at start-up.
module v8051_system
  import v8051_pkg::*;
#(
  parameter string ROM_FILE = "rtl/v8051_rom_init.hex"
) (
  input  logic       clkfast,
  input  logic       rst,
  input  logic [7:0] p0_in,
  input  logic [7:0] p1_in,
  input  logic [7:0] p2_in,
  input  logic [7:0] p3_in,
  output logic [7:0] p0_out,
  output logic [7:0] p1_out,
  output logic [7:0] p2_out,
  output logic [7:0] p3_out,
  output cpu_state_e cpu_state,
  output exe_state_e exe_state
);

  logic [15:0] xm_addr;
  logic [7:0]  xm_wr_data, xm_rd_data;
  logic        xm_wr, xm_rd;

  v8051_model #(.ROM_FILE(ROM_FILE)) u_core (
    .clkfast    (clkfast),
    .rst        (rst),
    .p0_in      (p0_in),
    .p1_in      (p1_in),
    .p2_in      (p2_in),
    .p3_in      (p3_in),
    .p0_out     (p0_out),
    .p1_out     (p1_out),
    .p2_out     (p2_out),
    .p3_out     (p3_out),
    .xm_addr    (xm_addr),
    .xm_wr_data (xm_wr_data),
    .xm_wr      (xm_wr),
    .xm_rd      (xm_rd),
    .xm_rd_data (xm_rd_data),
    .cpu_state  (cpu_state),
    .exe_state  (exe_state)
  );

  v8051_xram #(.ADDR_W(16)) u_xram (
    .clk        (clkfast),
    .xm_addr    (xm_addr),
    .xm_wr_data (xm_wr_data),
    .xm_wr      (xm_wr),
    .xm_rd      (xm_rd),
    .xm_rd_data (xm_rd_data)
  );

endmodule
