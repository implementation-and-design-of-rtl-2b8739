// 128-bit multiply-accumulate unit: acc <- acc + a * b.
//
// Datapath (one operation per clock when en is high):
//   m1 precise_128 : y_mul[255:0] = a * b              (combinational)
//   a1 adder_256   : y_add[256:0] = y_mul + acc[255:0] (parallel prefix, cin 0)
//   a2 accum       : acc[256:0] <= y_add                (PIPO register, en)
// The accumulator feeds its low 256 bits back into the adder, so the running
// sum wraps modulo 2^256 and acc[256] is the carry-out (overflow) of the most
// recent addition. y is the accumulator output. The result of the operands
// presented in one cycle is visible on y after the next rising edge.
// Instance names, widths and the feedback of the low 256 bits follow the
// design; clr and rst_n are this implementation's additions.
module mac_128 #(
  parameter int unsigned N = 128
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           en,
  input  logic           clr,
  output logic [2*N:0]   y
);
  logic [2*N-1:0] y_mul;
  logic [2*N:0]   y_add;

  precise_128 #(.N(N)) m1 (.a(a), .b(b), .y(y_mul));

  adder_256 #(.N(2*N)) a1 (.a(y_mul), .b(y[2*N-1:0]), .cin(1'b0), .y(y_add));

  accum #(.W(2*N+1)) a2 (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(y_add), .y(y));
endmodule
