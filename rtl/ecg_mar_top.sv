// ecg_mar_top: digital core of a wearable ECG recorder that removes motion
// artifacts with an LMS adaptive filter whose multipliers are APC-OMS
// look-up tables instead of MAC units.
//
// Samples arrive from the ADC side as pairs (x = ECG with motion artifact,
// d = reference) with a valid/ready handshake; `enable` gates acceptance of
// new samples. Each accepted pair produces one enhanced ECG sample y and one
// error sample e, announced by out_valid. `count` counts the output samples
// (wrapping at 2^11). The weights are brought out for observation.
// The analog front end, ADC, power management unit and memory beside the
// core are not part of this RTL: the ADC samples enter through the x/d
// ports, and nothing connects to a PMU or memory.
// The LMS structure follows the published scheme; `enable` and the 11-bit
// output counter mirror signal names of the reference simulation, with
// their function chosen here; the handshake is this design's choice.
module ecg_mar_top
  import mar_pkg::*;
#(
  parameter int unsigned L     = TAPS,
  parameter int unsigned X_W   = DATA_W,
  parameter int unsigned A_W   = COEF_W,
  parameter int unsigned FRAC  = COEF_FRAC,
  parameter int unsigned MU_SH = MU_SHIFT,
  parameter int unsigned CNT_W = 11
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,      // accept new samples
  input  logic                  adapt_en,    // adapt weights (else frozen)
  input  logic                  adc_valid,   // x/d sample pair available
  output logic                  adc_ready,   // pair taken this cycle if valid
  input  logic signed [X_W-1:0] ecg_x,       // ECG with motion artifact x(n)
  input  logic signed [X_W-1:0] ecg_d,       // reference input d(n)
  output logic                  out_valid,
  output logic signed [X_W-1:0] ecg_out,     // enhanced ECG y(n)
  output logic signed [X_W-1:0] err_out,     // error e(n)
  output logic signed [A_W-1:0] weights [L],
  output logic [CNT_W-1:0]      count,       // output samples produced
  output logic                  sat_flag     // any saturation in this sample
);

  logic core_ready, y_sat, e_sat, w_sat;

  lms_core #(.L(L), .X_W(X_W), .A_W(A_W), .FRAC(FRAC), .MU_SH(MU_SH)) u_core (
    .clk(clk), .rst_n(rst_n), .adapt_en(adapt_en),
    .in_valid(adc_valid && enable), .in_ready(core_ready),
    .x_in(ecg_x), .d_in(ecg_d),
    .out_valid(out_valid), .y_out(ecg_out), .e_out(err_out), .w(weights),
    .y_sat(y_sat), .e_sat(e_sat), .w_sat(w_sat)
  );

  assign adc_ready = core_ready && enable;
  assign sat_flag  = (out_valid && (y_sat || e_sat)) || w_sat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         count <= '0;
    else if (out_valid) count <= count + 1'b1;
  end

endmodule
