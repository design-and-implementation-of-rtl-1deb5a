// apc_oms_addsub: final stage of an APC-OMS digit multiplier.
//
// out = 16A + shifted  when add = 1 (x4 = 1)
// out = 16A - shifted  when add = 0 (x4 = 0)
// The mid value 16A is formed by a fixed left shift of the coefficient A.
// This is the anti-symmetric product relation of the APC scheme; the
// signed two's-complement arithmetic is this design's choice.
// Purely combinational.
module apc_oms_addsub #(
  parameter int unsigned A_W = 16,      // coefficient width
  parameter int unsigned W   = A_W + 5  // result width
) (
  input  logic signed [A_W-1:0] a,        // coefficient A
  input  logic signed [W-1:0]   shifted,  // barrel shifter output
  input  logic                  add,      // 1: add, 0: subtract
  output logic signed [W-1:0]   out       // X * A for the digit X
);

  logic signed [W-1:0] mid;  // 16A

  always_comb begin
    mid = W'(a) <<< 4;
    out = add ? mid + shifted : mid - shifted;
  end

endmodule
