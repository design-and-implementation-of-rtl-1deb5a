// apc_oms_addr_gen: X generation, address generator and control unit of one
// 5-bit APC-OMS multiplier digit.
//
// For the input digit X = x4..x0 it forms the anti-symmetric word
//   X' = X[3:0]                      when x4 = 1 (product = 16A + X'*A)
//   X' = two's complement of X[3:0]  when x4 = 0 (product = 16A - X'*A)
// and then the odd-multiple address: X'' is X' with its trailing zeros
// shifted out, the shift count is {s1,s0}, and the LUT address is
//   d[2:0] = X''[3:1],  d3 = ~X''[0].
// X' = 0000 therefore maps to address 1000 (the ninth word, 2A) with a shift
// of 3, which gives the 16A needed for X = 00000. RESET = x4 & ~(x3|x2|x1|x0)
// flags X = 10000, whose product is 16A exactly, so the shifted word is
// cleared. add = x4 selects addition in the add/sub unit.
//
// The mapping follows the APC-OMS equations and tables. The shift-select
// equations are written in the form s1 = ~(x0'|x1'), s0 = ~x0' & (x1' | ~x2'),
// which reproduces the shift column of the OMS table for every X'.
// Purely combinational; no clock.
module apc_oms_addr_gen
  import mar_pkg::*;
(
  input  logic [DIGIT_W-1:0] x,      // input digit x4..x0
  output logic [3:0]         xp,     // X' (anti-symmetric 4-bit word)
  output logic [LUT_AW-1:0]  d,      // LUT address d3..d0
  output logic [1:0]         s,      // barrel shifter select {s1,s0}
  output logic               reset,  // clears the barrel shifter output
  output logic               add     // 1: 16A + APC, 0: 16A - APC
);

  logic [3:0] xpp;  // X'': X' without trailing zeros

  always_comb begin
    xp    = x[4] ? x[3:0] : 4'(-x[3:0]);
    s[1]  = ~(xp[0] | xp[1]);
    s[0]  = ~xp[0] & (xp[1] | ~xp[2]);
    xpp   = xp >> s;
    d     = {~xpp[0], xpp[3:1]};
    reset = x[4] & ~(|x[3:0]);
    add   = x[4];
  end

endmodule
