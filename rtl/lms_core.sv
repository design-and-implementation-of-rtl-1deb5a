// lms_core: LMS adaptive filter for motion-artifact reduction in ECG.
//
// The primary input x(n) is the ECG sample with motion artifact and d(n) is
// the reference input. The transversal filter forms y(n) = w^T(n) x(n)
// (the enhanced ECG output), the error summer forms e(n) = d(n) - y(n), and
// the adaptive weight control applies w(n+1) = w(n) + mu x(n) e(n). All
// multiplications are memory based (APC-OMS LUTs); no hardware multiplier
// is used.
//
// Per sample the sequencer runs S_IDLE -> S_FILTER -> S_ADAPT -> S_WLOAD:
//   accept  : in_valid && in_ready shifts x into the delay line, latches d
//   filter  : y and e are registered, out_valid pulses the cycle after
//   adapt   : error LUT fill (9 cycles) and the one-cycle weight update
//   wload   : all tap LUTs refilled with the new weights (9 cycles)
// in_ready is high only in S_IDLE. With adaptation on, the core is ready
// again 25 cycles after it accepts a sample: 1 to register y/e, 1 to hand e
// to the weight control, 11 for the error LUT fill and weight update, 1 to
// start the tap LUT refill, 9 for the refill and 2 to return to S_IDLE.
// With adapt_en low (weights frozen) the period is 2 cycles.
// e is saturated to DATA_W bits (`e_sat`).
// The filter structure and equations follow the LMS scheme; the handshake,
// sequencing, adapt_en freeze and number formats are this design's choices.
module lms_core
  import mar_pkg::*;
#(
  parameter int unsigned L     = TAPS,
  parameter int unsigned X_W   = DATA_W,
  parameter int unsigned A_W   = COEF_W,
  parameter int unsigned FRAC  = COEF_FRAC,
  parameter int unsigned MU_SH = MU_SHIFT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  adapt_en,    // 1: update weights each sample
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [X_W-1:0] x_in,        // ECG with motion artifact
  input  logic signed [X_W-1:0] d_in,        // reference / desired input
  output logic                  out_valid,   // y_out, e_out valid (pulse)
  output logic signed [X_W-1:0] y_out,       // enhanced ECG y(n)
  output logic signed [X_W-1:0] e_out,       // error e(n)
  output logic signed [A_W-1:0] w [L],       // current weights
  output logic                  y_sat,       // y(n) saturated (with out_valid)
  output logic                  e_sat,       // e(n) saturated (with out_valid)
  output logic                  w_sat        // a weight saturated (pulse)
);

  lms_state_e            state;
  logic signed [X_W-1:0] d_q, y_c, e_c;
  logic signed [X_W-1:0] x_taps [L];
  logic                  y_sat_c, e_sat_c, lut_ready, lut_load;
  logic                  wc_start, wc_done, wc_busy;
  logic signed [X_W:0]   e_full;

  assign in_ready = (state == S_IDLE);

  transversal_filter #(.L(L), .X_W(X_W), .A_W(A_W), .FRAC(FRAC)) u_filter (
    .clk(clk), .rst_n(rst_n), .shift(in_valid && in_ready), .x_in(x_in),
    .w(w), .lut_load(lut_load), .lut_ready(lut_ready), .x_taps(x_taps),
    .y(y_c), .y_sat(y_sat_c)
  );

  adaptive_weight_control #(.L(L), .X_W(X_W), .A_W(A_W), .MU_SH(MU_SH)) u_wctl (
    .clk(clk), .rst_n(rst_n), .start(wc_start), .e(e_out), .x_taps(x_taps),
    .w(w), .done(wc_done), .busy(wc_busy), .w_sat(w_sat)
  );

  // Error summer with saturation.
  localparam logic signed [X_W:0] EMAX = (X_W+1)'((2 ** (X_W - 1)) - 1);
  localparam logic signed [X_W:0] EMIN = -(X_W+1)'(2 ** (X_W - 1));

  always_comb begin
    e_full  = (X_W+1)'(d_q) - (X_W+1)'(y_c);
    e_sat_c = (e_full > EMAX) || (e_full < EMIN);
    if (e_full > EMAX)      e_c = X_W'(EMAX);
    else if (e_full < EMIN) e_c = X_W'(EMIN);
    else                    e_c = X_W'(e_full);
  end

  assign lut_load = (state == S_ADAPT) && wc_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      d_q       <= '0;
      y_out     <= '0;
      e_out     <= '0;
      out_valid <= 1'b0;
      y_sat     <= 1'b0;
      e_sat     <= 1'b0;
      wc_start  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      wc_start  <= 1'b0;
      unique case (state)
        S_IDLE:   if (in_valid) begin
                    d_q   <= d_in;
                    state <= S_FILTER;
                  end
        S_FILTER: begin
                    y_out     <= y_c;
                    e_out     <= e_c;
                    y_sat     <= y_sat_c;
                    e_sat     <= e_sat_c;
                    out_valid <= 1'b1;
                    if (adapt_en) begin
                      wc_start <= 1'b1;
                      state    <= S_ADAPT;
                    end else begin
                      state    <= S_IDLE;
                    end
                  end
        S_ADAPT:  if (wc_done) state <= S_WLOAD;
        S_WLOAD:  if (lut_ready) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // The filter LUTs are only refilled while the core is between samples.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && in_ready) |-> lut_ready)
    else $error("sample accepted while tap LUTs were not ready");

  // wc_busy is observed by the assertion below only.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_IDLE) |-> !wc_busy)
    else $error("weight control busy while the core is idle");

endmodule
