// Unsigned N x N -> 2N-bit integer multiplier (N = 128 by default) for the MAC
// unit. Operand b is cut into 32-bit digits; each digit times a gives one
// partial product (N+32 bits), which is shifted to its digit position and all
// partial products are summed. Combinational, no clock: the product is valid
// once the inputs have settled.
// The widths (128-bit inputs, 256-bit product) follow the design; the inner
// partial-product structure is this implementation's own, since only the
// function of the multiplier is specified.
module precise_128 #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] y
);
  localparam int unsigned DW = 32;
  localparam int unsigned ND = (N + DW - 1) / DW;

  logic [ND*DW-1:0]    b_ext;
  logic [N+DW-1:0]     pp [ND];

  assign b_ext = {{(ND*DW-N){1'b0}}, b};

  for (genvar d = 0; d < ND; d++) begin : g_pp
    assign pp[d] = a * b_ext[d*DW +: DW];
  end

  always_comb begin
    logic [ND*DW+N-1:0] acc;
    acc = '0;
    for (int d = 0; d < ND; d++) begin
      acc = acc + ({{(ND*DW-DW){1'b0}}, pp[d]} << (d * DW));
    end
    y = acc[2*N-1:0];
  end
endmodule
