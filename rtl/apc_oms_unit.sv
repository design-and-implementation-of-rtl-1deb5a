// apc_oms_unit: one 5-bit APC-OMS multiplier digit, P = X * A for unsigned
// X = x4..x0 (0..31) and the coefficient A whose multiples sit in a shared
// apc_oms_lut.
//
// Data path (all combinational): address generator and control unit ->
// LUT read (through the lut_addr / lut_data pair, so several digits can share
// one table) -> barrel shifter (shift 0..3, cleared by RESET) -> add/sub unit
// (16A +/- shifted word). The chain and its stages follow the APC-OMS
// structure; the external LUT port is this design's choice.
module apc_oms_unit
  import mar_pkg::*;
#(
  parameter int unsigned A_W = COEF_W,   // coefficient width
  parameter int unsigned W   = A_W + 5   // product / LUT word width
) (
  input  logic [DIGIT_W-1:0]    x,         // multiplier digit
  input  logic signed [A_W-1:0] a,         // coefficient A (for 16A)
  output logic [LUT_AW-1:0]     lut_addr,  // address d to the LUT
  input  logic signed [W-1:0]   lut_data,  // word read at lut_addr
  output logic signed [W-1:0]   p          // X * A
);

  logic [1:0]          s;
  logic                reset, add;
  logic signed [W-1:0] shifted;

  apc_oms_addr_gen u_addr (
    .x(x), .xp(), .d(lut_addr), .s(s), .reset(reset), .add(add)
  );

  apc_oms_barrel_shifter #(.W(W)) u_shift (
    .word(lut_data), .s(s), .reset(reset), .out(shifted)
  );

  apc_oms_addsub #(.A_W(A_W), .W(W)) u_addsub (
    .a(a), .shifted(shifted), .add(add), .out(p)
  );

endmodule
