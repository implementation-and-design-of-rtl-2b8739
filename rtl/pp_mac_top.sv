// Top level: the 128-bit parallel prefix MAC unit and the single precision
// floating-point unit, side by side. The two share only clock and reset;
// each has its own ports.
//   MAC: mac_y <= {carry, mac_y[255:0] + mac_a * mac_b} on each edge with
//        mac_en high (mac_clr clears); see mac_128.
//   FPU: fpu_opa op fpu_opb in rounding mode fpu_rmode, result with
//        fpu_ready three edges after fpu_start; see fpu_sp.
module pp_mac_top #(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  // MAC unit
  input  logic [N-1:0] mac_a,
  input  logic [N-1:0] mac_b,
  input  logic         mac_en,
  input  logic         mac_clr,
  output logic [2*N:0] mac_y,
  // floating-point unit
  input  logic         fpu_start,
  input  logic [1:0]   fpu_op,
  input  logic [1:0]   fpu_rmode,
  input  logic [31:0]  fpu_opa,
  input  logic [31:0]  fpu_opb,
  output logic         fpu_ready,
  output logic [31:0]  fpu_result,
  output logic         fpu_zero,
  output logic         fpu_snan,
  output logic         fpu_qnan,
  output logic         fpu_inf,
  output logic         fpu_ine
);
  mac_128 #(.N(N)) u_mac (
    .clk(clk), .rst_n(rst_n), .a(mac_a), .b(mac_b),
    .en(mac_en), .clr(mac_clr), .y(mac_y)
  );

  fpu_sp u_fpu (
    .clk(clk), .rst_n(rst_n), .start(fpu_start), .op(fpu_op), .rmode(fpu_rmode),
    .opa(fpu_opa), .opb(fpu_opb), .ready(fpu_ready), .result(fpu_result),
    .zero(fpu_zero), .snan(fpu_snan), .qnan(fpu_qnan), .inf(fpu_inf), .ine(fpu_ine)
  );
endmodule
