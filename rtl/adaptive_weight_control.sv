// adaptive_weight_control: LMS weight update of the adaptive filter,
//   w_i(n+1) = w_i(n) + mu * x(n-i) * e(n),   i = 0..L-1.
//
// The products x(n-i)*e(n) are also memory based: one apc_oms_lut is loaded
// with the odd multiples of e(n) and read by the L lut_multiplier instances
// (ND read ports each), so a single 9-word table serves every tap. mu is a
// power of two, mu = 2^-MU_SH in the integer scale used here (see mar_pkg);
// the step is (x*e) >>> MU_SH and every new weight saturates to A_W bits
// (`w_sat` flags it).
//
// Timing: a `start` pulse latches e and starts the error LUT fill (9 cycles).
// In the cycle after the fill ends all weights are written at once and
// `done` pulses. The taps must stay unchanged from `start` to `done`.
// Weights reset to zero.
// The update equation follows the LMS algorithm; the shared error LUT,
// power-of-two step size, saturation and timing are this design's choices.
module adaptive_weight_control
  import mar_pkg::*;
#(
  parameter int unsigned L     = TAPS,
  parameter int unsigned X_W   = DATA_W,
  parameter int unsigned A_W   = COEF_W,
  parameter int unsigned MU_SH = MU_SHIFT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,          // e is valid, begin update
  input  logic signed [X_W-1:0] e,              // error e(n)
  input  logic signed [X_W-1:0] x_taps [L],     // x(n-i)
  output logic signed [A_W-1:0] w [L],          // weights w_i
  output logic                  done,           // weights updated (pulse)
  output logic                  busy,           // update in progress
  output logic                  w_sat           // a weight saturated (pulse)
);

  localparam int unsigned EW = X_W + 5;         // error LUT word width
  localparam int unsigned ND = n_digits(X_W);
  localparam int unsigned PW = 2 * X_W;
  localparam int unsigned SW = PW + 1;

  wctl_state_e         state;
  logic signed [X_W-1:0] e_q;
  logic                elut_ready;
  logic [LUT_AW-1:0]   raddr [L*ND];
  logic signed [EW-1:0] rdata [L*ND];
  logic signed [PW-1:0] prod [L];
  logic signed [A_W-1:0] w_next [L];
  logic [L-1:0]        sat_v;

  apc_oms_lut #(.A_W(X_W), .W(EW), .NREAD(L*ND)) u_elut (
    .clk(clk), .rst_n(rst_n), .load(start && state == W_IDLE), .a(e),
    .ready(elut_ready), .raddr(raddr), .rdata(rdata)
  );

  for (genvar i = 0; i < L; i++) begin : g_tap
    logic [LUT_AW-1:0]    addr [ND];
    logic signed [EW-1:0] data [ND];
    for (genvar k = 0; k < ND; k++) begin : g_port
      assign raddr[i*ND+k] = addr[k];
      assign data[k]       = rdata[i*ND+k];
    end

    lut_multiplier #(.X_W(X_W), .A_W(X_W), .W(EW), .ND(ND)) u_mul (
      .x(x_taps[i]), .a(e_q), .lut_addr(addr), .lut_data(data), .p(prod[i])
    );
  end

  localparam logic signed [SW-1:0] WMAX = SW'((2 ** (A_W - 1)) - 1);
  localparam logic signed [SW-1:0] WMIN = -SW'(2 ** (A_W - 1));

  always_comb begin
    for (int i = 0; i < L; i++) begin
      logic signed [SW-1:0] sum;
      sum = SW'(w[i]) + SW'(prod[i] >>> MU_SH);
      sat_v[i] = (sum > WMAX) || (sum < WMIN);
      if (sum > WMAX)      w_next[i] = A_W'(WMAX);
      else if (sum < WMIN) w_next[i] = A_W'(WMIN);
      else                 w_next[i] = A_W'(sum);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= W_IDLE;
      e_q   <= '0;
      done  <= 1'b0;
      w_sat <= 1'b0;
      for (int i = 0; i < L; i++) w[i] <= '0;
    end else begin
      done  <= 1'b0;
      w_sat <= 1'b0;
      unique case (state)
        W_IDLE:   if (start) begin
                    e_q   <= e;
                    state <= W_ELOAD;
                  end
        W_ELOAD:  if (elut_ready) state <= W_UPDATE;
        W_UPDATE: begin
                    for (int i = 0; i < L; i++) w[i] <= w_next[i];
                    w_sat <= |sat_v;
                    done  <= 1'b1;
                    state <= W_IDLE;
                  end
        default:  state <= W_IDLE;
      endcase
    end
  end

  assign busy = (state != W_IDLE);

endmodule
