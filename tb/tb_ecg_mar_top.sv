// tb_ecg_mar_top: end-to-end run of the motion-artifact canceller with all
// parameters at their defaults.
//
// Workload: a synthetic ECG d(n) (P wave, QRS spike and T wave every 180
// samples, built from piecewise-linear segments) and x(n) = d(n) plus a
// motion artifact made of a component alternating at half the sample rate
// and a quarter-rate square wave. Every output y, e and every weight is
// compared with the integer reference model, and the error must shrink as
// the filter adapts, and to a quarter of the artifact in x(n).
// Mechanisms that must each occur at least once:
// weight adaptation, frozen weights (adapt_en low), input stall (enable
// low), back-pressure while the core is busy, saturation of y/e, APC-OMS
// digits 10000 (RESET path) and 00000 (2A << 3 path), and wrap of the
// 11-bit output counter.
module tb_ecg_mar_top;
  import mar_pkg::*;
  import lms_ref_pkg::*;
  localparam int L = TAPS, XW = DATA_W, AW = COEF_W;
  localparam int NS = 3600;   // length of a 10 s record at 360 Hz

  logic clk = 0, rst_n = 0, enable = 1, adapt_en = 1, adc_valid = 0, adc_ready;
  logic out_valid, sat_flag;
  logic signed [XW-1:0] ecg_x = '0, ecg_d = '0, ecg_out, err_out;
  logic signed [AW-1:0] weights [L];
  logic [10:0] count;
  int checks = 0, failures = 0;
  longint wm [] = new[L];
  longint xm [] = new[L];
  longint err_first = 0, err_last = 0, err_raw = 0;
  int n_adapt = 0, n_frozen = 0, n_stall = 0, n_busy = 0, n_sat = 0;
  int n_dig_reset = 0, n_dig_zero = 0, n_wrap = 0;

  ecg_mar_top dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .adapt_en(adapt_en),
    .adc_valid(adc_valid), .adc_ready(adc_ready), .ecg_x(ecg_x), .ecg_d(ecg_d),
    .out_valid(out_valid), .ecg_out(ecg_out), .err_out(err_out),
    .weights(weights), .count(count), .sat_flag(sat_flag)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Synthetic ECG beat, amplitude in ADC counts.
  function automatic longint ecg(input int n);
    longint t = longint'(n) % 180;
    if (t >= 20 && t < 40)  return (t < 30) ? (t - 20) * 150 : (40 - t) * 150;    // P
    if (t >= 60 && t < 64)  return -(t - 59) * 500;                                // Q
    if (t >= 64 && t < 70)  return (t - 64) * 2500 - 2000;                         // R up
    if (t >= 70 && t < 76)  return 12500 - (t - 70) * 2500;                        // R down
    if (t >= 76 && t < 80)  return -2500 + (t - 76) * 625;                         // S
    if (t >= 110 && t < 150) return (t < 130) ? (t - 110) * 120 : (150 - t) * 120; // T
    return 0;
  endfunction

  function automatic longint artifact(input int n);
    return ((n % 2 != 0) ? 3000 : -3000) + (((n / 2) % 2 != 0) ? 1500 : -1500);
  endfunction

  always @(posedge clk) begin
    if (adc_valid && !enable) n_stall++;
    if (adc_valid && enable && !adc_ready) n_busy++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (xm[i]) begin xm[i] = 0; wm[i] = 0; end
    #12 rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      longint xv, dv, yexp, eexp;
      logic [19:0] u;
      logic burst;
      @(negedge clk);
      // weights frozen for a stretch; a full-scale burst inside it
      adapt_en = !(n >= 1500 && n < 1560);
      burst = (n >= 1520 && n < 1530);
      dv = burst ? -32768 : ecg(n);
      xv = burst ? 32767 : sat(dv + artifact(n), XW);
      if (n == 1000) begin                        // stall the input for a while
        enable = 0; adc_valid = 1;
        repeat (20) @(negedge clk);
        enable = 1;
      end
      ecg_x = XW'(xv); ecg_d = XW'(dv); adc_valid = 1;
      u = 20'({~ecg_x[XW-1], ecg_x[XW-2:0]});
      for (int k = 0; k < 4; k++) begin
        if (u[5*k +: 5] == 5'b10000) n_dig_reset++;
        if (u[5*k +: 5] == 5'b00000) n_dig_zero++;
      end
      do @(posedge clk); while (!adc_ready);
      #1 adc_valid = 0;
      wait (out_valid);
      // count still holds the number of earlier outputs
      check("count", longint'(count), longint'(n) % 2048);
      if (n > 0 && count == 0) n_wrap++;
      for (int i = L - 1; i > 0; i--) xm[i] = xm[i-1];
      xm[0] = xv;
      yexp = fir(wm, xm, COEF_FRAC, XW);
      eexp = sat(dv - yexp, XW);
      check("y", longint'(ecg_out), yexp);
      check("e", longint'(err_out), eexp);
      if (sat_flag) n_sat++;
      if (n < 300) err_first += (eexp < 0) ? -eexp : eexp;
      if (n >= 1200 && n < 1500) begin
        err_last += (eexp < 0) ? -eexp : eexp;
        err_raw  += (xv - dv < 0) ? dv - xv : xv - dv;
      end
      if (adapt_en) begin
        update(wm, xm, eexp, MU_SHIFT, AW);
        n_adapt++;
      end else n_frozen++;
      @(negedge clk);
      // every fifth sample the next one is offered while the core is still
      // busy; the weights are then checked one sample later
      if (n % 5 != 0) begin
        while (!adc_ready) @(negedge clk);
        foreach (weights[i]) check("w", longint'(weights[i]), wm[i]);
      end
    end
    $display("mean |e| samples 0-299 = %0d, 1200-1499 = %0d; mean |x-d| 1200-1499 = %0d",
             err_first / 300, err_last / 300, err_raw / 300);
    $display("adapt=%0d frozen=%0d stall=%0d busy=%0d sat=%0d dig10000=%0d dig00000=%0d wrap=%0d",
             n_adapt, n_frozen, n_stall, n_busy, n_sat, n_dig_reset, n_dig_zero, n_wrap);
    check("error reduced", longint'(err_last < err_first), 1);
    check("artifact reduced 4x", longint'(err_last * 4 < err_raw), 1);
    check("adaptation seen", longint'(n_adapt > 0), 1);
    check("frozen weights seen", longint'(n_frozen > 0), 1);
    check("enable stall seen", longint'(n_stall > 0), 1);
    check("busy back-pressure seen", longint'(n_busy > 0), 1);
    check("saturation seen", longint'(n_sat > 0), 1);
    check("RESET digit seen", longint'(n_dig_reset > 0), 1);
    check("zero digit seen", longint'(n_dig_zero > 0), 1);
    check("counter wrap seen", longint'(n_wrap > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
