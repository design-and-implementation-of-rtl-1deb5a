// apc_oms_lut: configurable 9-word look-up table of an APC-OMS multiplier.
//
// Word k (k = 0..7, address d = 0kkk) holds the odd multiple (2k+1)*A and
// word 8 (address 1000) holds 2A, as in the OMS table. The table is
// reconfigured whenever the coefficient A changes: a one-cycle pulse on
// `load` latches A, and the words are then written one per clock by a single
// adder that steps an accumulator by 2A (A, 3A, 5A, ... 15A), followed by 2A.
// `ready` is low for the 9 fill cycles and rises in the cycle after the last
// write, so a fill takes 9 cycles from the load pulse. A load while busy
// restarts the fill.
//
// NREAD combinational read ports share the table (one per multiplier digit
// that uses this coefficient). Addresses 1001..1111 never occur and read 0.
// The 9-word content follows the APC-OMS scheme; the sequential fill with one
// adder, the reset state (all words zero, ready high) and the read ports are
// this design's choices.
module apc_oms_lut
  import mar_pkg::*;
#(
  parameter int unsigned A_W   = COEF_W,     // coefficient width
  parameter int unsigned W     = A_W + 5,    // word width
  parameter int unsigned NREAD = 1           // number of read ports
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,              // start a fill with `a`
  input  logic signed [A_W-1:0] a,                 // new coefficient A
  output logic                  ready,             // table holds multiples of A
  input  logic [LUT_AW-1:0]     raddr [NREAD],     // read addresses d
  output logic signed [W-1:0]   rdata [NREAD]      // read words
);

  logic signed [W-1:0] mem [LUT_DEPTH];
  logic signed [W-1:0] acc;       // next odd multiple to write
  logic signed [W-1:0] two_a;     // 2A of the coefficient being loaded
  logic [LUT_AW-1:0]   wptr;      // word being written
  logic                busy;

  assign ready = ~busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      wptr  <= '0;
      acc   <= '0;
      two_a <= '0;
      for (int i = 0; i < LUT_DEPTH; i++) mem[i] <= '0;
    end else if (load) begin
      busy  <= 1'b1;
      wptr  <= '0;
      acc   <= W'(a);
      two_a <= W'(a) <<< 1;
    end else if (busy) begin
      if (wptr == LUT_AW'(LUT_DEPTH - 1)) begin
        mem[wptr] <= two_a;          // ninth word: 2A
        busy      <= 1'b0;
      end else begin
        mem[wptr] <= acc;            // odd multiple (2*wptr+1)*A
        acc       <= acc + two_a;
      end
      wptr <= wptr + 1'b1;
    end
  end

  always_comb begin
    for (int p = 0; p < NREAD; p++)
      rdata[p] = (raddr[p] < LUT_AW'(LUT_DEPTH)) ? mem[raddr[p]] : '0;
  end

endmodule
