// lut_multiplier: memory-based multiplier p = x * a for a signed sample x and
// a signed coefficient a whose multiples are held in an APC-OMS LUT.
//
// The sample is first turned into offset binary, u = x + 2^(X_W-1) (its sign
// bit inverted), so that u is unsigned. u is cut into ND = ceil(X_W/5)
// digits of 5 bits; each digit is multiplied by a in its own apc_oms_unit,
// all units reading the same 9-word LUT through their own read port. Then
//   x * a = sum_k (u_k * a) << 5k  -  a << (X_W-1).
// Fully combinational; the LUT must hold the multiples of `a` (its ready
// output high) for the product to be valid.
// The APC-OMS digit is the published scheme; the digit split, the
// offset-binary sign handling and the shift-add combination are this
// design's choices, since only 5-bit inputs are worked out there.
module lut_multiplier
  import mar_pkg::*;
#(
  parameter int unsigned X_W = DATA_W,     // sample width
  parameter int unsigned A_W = COEF_W,     // coefficient width
  parameter int unsigned W   = A_W + 5,    // LUT word width
  parameter int unsigned ND  = n_digits(X_W)
) (
  input  logic signed [X_W-1:0]     x,
  input  logic signed [A_W-1:0]     a,
  output logic [LUT_AW-1:0]         lut_addr [ND],
  input  logic signed [W-1:0]       lut_data [ND],
  output logic signed [X_W+A_W-1:0] p
);

  localparam int unsigned UW = ND * DIGIT_W;     // padded unsigned width
  localparam int unsigned SW = UW + A_W + 1;     // partial sum width

  logic [UW-1:0]       u;
  logic signed [W-1:0] pd [ND];
  logic signed [SW-1:0] sum;

  assign u = UW'({~x[X_W-1], x[X_W-2:0]});

  for (genvar k = 0; k < ND; k++) begin : g_digit
    apc_oms_unit #(.A_W(A_W), .W(W)) u_digit (
      .x(u[k*DIGIT_W +: DIGIT_W]), .a(a),
      .lut_addr(lut_addr[k]), .lut_data(lut_data[k]), .p(pd[k])
    );
  end

  always_comb begin
    sum = -(SW'(a) <<< (X_W - 1));
    for (int k = 0; k < ND; k++)
      sum = sum + (SW'(pd[k]) <<< (DIGIT_W * k));
    p = (X_W+A_W)'(sum);
  end

endmodule
