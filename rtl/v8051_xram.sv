// v8051_xram: external data memory for the v8051 soft core.
//
// A byte-wide memory with 16 address lines (64 KB by default) reached by the
// MOVX instructions. It sits outside the core and is attached to the core's
// external-memory bus (xm_*), clocked by the core's fast clock. On every clk
// edge with xm_wr set, xm_wr_data is stored at xm_addr; with xm_rd set the
// addressed byte is registered into xm_rd_data and then held. The core keeps
// address, data and strobes stable for a whole slow clock (three fast
// clocks), so a write is simply repeated and a read is ready, and held, when
// the core samples it in the next slow clock.
//
// The document gives only the function and the address width. Unlike the
// internal RAM it is not cleared by reset (a 64 KB clear is not practical);
// its contents start undefined. The size is a parameter (ADDR_W).
module v8051_xram #(
  parameter int ADDR_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] xm_addr,
  input  logic [7:0]        xm_wr_data,
  input  logic              xm_wr,
  input  logic              xm_rd,
  output logic [7:0]        xm_rd_data
);

  logic [7:0] mem [1 << ADDR_W];

  always_ff @(posedge clk) begin
    if (xm_wr) mem[xm_addr] <= xm_wr_data;
    if (xm_rd) xm_rd_data   <= mem[xm_addr];
  end

  // The bus carries either a read or a write, never both.
  always_ff @(posedge clk) begin
    assert (!(xm_rd && xm_wr)) else $error("external memory read and write strobed together");
  end

endmodule
