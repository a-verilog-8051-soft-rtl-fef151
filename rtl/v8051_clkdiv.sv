// v8051_clkdiv: slow-clock generator of the v8051 soft core.
//
// The core runs from the external clock clkfast; its internal operations run
// at clkfast / DIV (DIV = 3 in the document). A small counter (two bits for
// DIV = 3, the document uses a 3-bit counter) counts fast clocks, and ce is
// high for one fast clock in every DIV. All slow logic is clocked by clkfast
// and advances only when ce is high, which gives the divided timing without a
// second clock net. After reset the first ce comes DIV-1 fast clocks later.
module v8051_clkdiv #(
  parameter int DIV = 3
) (
  input  logic clk,
  input  logic rst,
  output logic ce
);

  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      ce  <= 1'b0;
    end else begin
      if (cnt == CW'(DIV - 1)) cnt <= '0;
      else                     cnt <= cnt + 1'b1;
      ce <= (cnt == CW'(DIV - 2));
    end
  end

endmodule
