// transversal_filter: the L-tap FIR part of the LMS filter,
//   y(n) = sum_{i=0}^{L-1} w_i(n) x(n-i),
// with every tap multiplication done by a memory-based APC-OMS multiplier
// instead of a hardware multiplier.
//
// A shift register holds x(n)..x(n-L+1); `shift` loads a new sample into
// tap 0. Each tap owns a 9-word apc_oms_lut holding the odd multiples of its
// weight, shared by the ND digit units of that tap's lut_multiplier. When the
// weights change, a pulse on `lut_load` refills all tap LUTs in parallel
// (9 cycles, `lut_ready` low meanwhile). The products are summed in full
// precision; y is the sum scaled by 2^-COEF_FRAC (weights are Q2.14) and
// saturated to DATA_W bits, with `y_sat` flagging saturation.
// y is combinational from the taps and the LUT contents, valid one cycle
// after `shift` while lut_ready is high.
// The tap structure follows the transversal filter of the LMS scheme; the
// number format, saturation and per-tap LUTs are this design's choices.
module transversal_filter
  import mar_pkg::*;
#(
  parameter int unsigned L    = TAPS,
  parameter int unsigned X_W  = DATA_W,
  parameter int unsigned A_W  = COEF_W,
  parameter int unsigned FRAC = COEF_FRAC
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift,          // load x_in into the delay line
  input  logic signed [X_W-1:0] x_in,           // new sample x(n)
  input  logic signed [A_W-1:0] w [L],          // current weights w_i(n)
  input  logic                  lut_load,       // refill tap LUTs from w
  output logic                  lut_ready,      // all tap LUTs hold w
  output logic signed [X_W-1:0] x_taps [L],     // x(n-i), i = 0..L-1
  output logic signed [X_W-1:0] y,              // filter output y(n)
  output logic                  y_sat           // y was saturated
);

  localparam int unsigned W   = A_W + 5;
  localparam int unsigned ND  = n_digits(X_W);
  localparam int unsigned PW  = X_W + A_W;
  localparam int unsigned ACC = PW + $clog2(L) + 1;

  logic signed [PW-1:0]  prod [L];
  logic [L-1:0]          ready_v;
  logic signed [ACC-1:0] acc, scaled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) x_taps[i] <= '0;
    end else if (shift) begin
      x_taps[0] <= x_in;
      for (int i = 1; i < L; i++) x_taps[i] <= x_taps[i-1];
    end
  end

  for (genvar i = 0; i < L; i++) begin : g_tap
    logic [LUT_AW-1:0]   addr [ND];
    logic signed [W-1:0] data [ND];

    apc_oms_lut #(.A_W(A_W), .W(W), .NREAD(ND)) u_lut (
      .clk(clk), .rst_n(rst_n), .load(lut_load), .a(w[i]),
      .ready(ready_v[i]), .raddr(addr), .rdata(data)
    );

    lut_multiplier #(.X_W(X_W), .A_W(A_W), .W(W), .ND(ND)) u_mul (
      .x(x_taps[i]), .a(w[i]), .lut_addr(addr), .lut_data(data), .p(prod[i])
    );
  end

  assign lut_ready = &ready_v;

  localparam logic signed [ACC-1:0] YMAX = ACC'((2 ** (X_W - 1)) - 1);
  localparam logic signed [ACC-1:0] YMIN = -ACC'(2 ** (X_W - 1));

  always_comb begin
    acc = '0;
    for (int i = 0; i < L; i++) acc = acc + ACC'(prod[i]);
    scaled = acc >>> FRAC;
    y_sat  = (scaled > YMAX) || (scaled < YMIN);
    if (scaled > YMAX)      y = X_W'(YMAX);
    else if (scaled < YMIN) y = X_W'(YMIN);
    else                    y = X_W'(scaled);
  end

endmodule
