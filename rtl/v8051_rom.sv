// v8051_rom: program memory of the v8051 soft core.
//
// A 4096 x 8 read-only memory (4 KB, 12 address lines) holding the program,
// loaded at start-up from a hexadecimal text file (INIT_FILE, $readmemh
// format, one byte per word; words the file does not give read as 00h, NOP).
//
// Timing: the memory array is read on every edge of the fast clock, through
// two register stages, so an address must be held for three fast clocks
// before its data is valid, as the document's synchronous ROM requires. The
// output register rom_data loads that value on the slow-clock edge (ce) when
// rom_rd is set. Seen from the controller, which changes rom_addr on a ce
// edge, the byte is in rom_data one slow clock later. Two clocks as in the
// document, realised here as one clock plus a clock enable.
module v8051_rom #(
  parameter int    ADDR_W    = 12,
  parameter string INIT_FILE = "rtl/v8051_rom_init.hex"
) (
  input  logic              clk,        // fast clock
  input  logic              ce,         // slow-clock enable
  input  logic              rom_rd,
  input  logic [ADDR_W-1:0] rom_addr,
  output logic [7:0]        rom_data
);

  localparam int DEPTH = 1 << ADDR_W;

  logic [7:0] mem [DEPTH];
  logic [7:0] q1, q2;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    q1 <= mem[rom_addr];
    q2 <= q1;
    if (ce && rom_rd) rom_data <= q2;
  end

endmodule
