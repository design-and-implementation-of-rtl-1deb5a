// apc_oms_barrel_shifter: restores even multiples from the odd multiple read
// out of the APC-OMS LUT.
//
// out = word << s for s = 0..3, or 0 when reset is high (input X = 10000).
// The operand is signed (two's complement) and the output is one bit wider
// than needed for 15A << 0 or 2A << 3 = 16A, so no bits are lost.
// The shift range follows the OMS table; the signed operand is this design's
// choice so that negative coefficients need no extra sign handling.
// Purely combinational.
module apc_oms_barrel_shifter #(
  parameter int unsigned W = 21   // word width (COEF_W + 5)
) (
  input  logic signed [W-1:0] word,   // LUT word (odd multiple or 2A)
  input  logic        [1:0]   s,      // shift amount {s1,s0}
  input  logic                reset,  // force output to zero
  output logic signed [W-1:0] out
);

  always_comb begin
    unique case (s)
      2'd0: out = word;
      2'd1: out = word <<< 1;
      2'd2: out = word <<< 2;
      2'd3: out = word <<< 3;
    endcase
    if (reset) out = '0;
  end

endmodule
