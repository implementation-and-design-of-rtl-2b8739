// Accumulator register of the MAC unit: a W-bit (257 by default) parallel-in,
// parallel-out register. On a rising clock edge it loads all W bits of a when
// en is high, clears to zero when clr is high (clr wins over en), and
// otherwise holds. y shows the stored value at all times.
// The PIPO structure, the width and the en pin follow the design; the
// asynchronous active-low reset and the synchronous clear are this
// implementation's additions so that an accumulation can be started cleanly.
module accum #(
  parameter int unsigned W = 257
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   y <= '0;
    else if (clr) y <= '0;
    else if (en)  y <= a;
  end
endmodule
