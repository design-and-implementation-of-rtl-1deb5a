// tb_transversal_filter: loads random weight sets into the tap LUTs, checks
// the 9-cycle refill, then shifts random samples through the delay line and
// compares y(n) and the saturation flag with a direct FIR computation.
module tb_transversal_filter;
  import mar_pkg::*;
  import lms_ref_pkg::*;
  localparam int L = 8, XW = 16, AW = 16, FR = 14;

  logic clk = 0, rst_n = 0, shift = 0, lut_load = 0, lut_ready, y_sat;
  logic signed [XW-1:0] x_in, y;
  logic signed [AW-1:0] w [L];
  logic signed [XW-1:0] x_taps [L];
  int checks = 0, failures = 0, sat_seen = 0;
  longint wm [] = new[L];
  longint xm [] = new[L];

  transversal_filter #(.L(L), .X_W(XW), .A_W(AW), .FRAC(FR)) dut (
    .clk(clk), .rst_n(rst_n), .shift(shift), .x_in(x_in), .w(w),
    .lut_load(lut_load), .lut_ready(lut_ready), .x_taps(x_taps), .y(y), .y_sat(y_sat)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_in = '0;
    foreach (w[i]) w[i] = '0;
    foreach (xm[i]) begin xm[i] = 0; wm[i] = 0; end
    #12 rst_n = 1;
    for (int set = 0; set < 12; set++) begin
      int cyc;
      longint yexp, yraw;
      int amp;
      // small weights for most sets, full-range ones to reach saturation
      amp = (set % 4 == 3) ? 32767 : 4096;
      @(negedge clk);
      foreach (w[i]) begin
        wm[i] = longint'($urandom_range(0, 2 * amp)) - longint'(amp);
        w[i] = AW'(wm[i]);
      end
      lut_load = 1;
      @(negedge clk) lut_load = 0;
      cyc = 1;
      while (!lut_ready && cyc < 40) begin @(negedge clk); cyc++; end
      check("lut refill cycles", longint'(cyc), 10);
      for (int n = 0; n < 40; n++) begin
        longint xv;
        xv = longint'($urandom_range(0, 65535)) - 32768;
        x_in = XW'(xv); shift = 1;
        @(negedge clk) shift = 0;
        for (int i = L - 1; i > 0; i--) xm[i] = xm[i-1];
        xm[0] = xv;
        yexp = fir(wm, xm, FR, XW);
        yraw = 0;
        foreach (wm[i]) yraw += wm[i] * xm[i];
        yraw = yraw >>> FR;
        check("y", longint'(y), yexp);
        check("y_sat", longint'(y_sat), longint'(yraw != yexp));
        if (y_sat) sat_seen++;
        foreach (x_taps[i]) check("tap", longint'(x_taps[i]), xm[i]);
      end
    end
    check("saturation exercised", longint'(sat_seen > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
