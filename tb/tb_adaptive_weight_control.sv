// tb_adaptive_weight_control: random taps and errors; after each start pulse
// the weights must equal w + ((x*e) >>> MU_SH), saturated, and done must come
// 11 clock edges after the edge that samples start (9-cycle error LUT fill,
// one cycle to see ready, one for the update).
// Large steps are used in some rounds to drive weights into saturation.
module tb_adaptive_weight_control;
  import mar_pkg::*;
  import lms_ref_pkg::*;
  localparam int L = 8, XW = 16, AW = 16;

  logic clk = 0, rst_n = 0, start = 0, done, busy, w_sat;
  logic signed [XW-1:0] e;
  logic signed [XW-1:0] x_taps [L];
  logic signed [AW-1:0] w [L];
  int checks = 0, failures = 0, sat_seen = 0;
  int mu_sh;
  longint wm [] = new[L];
  longint xm [] = new[L];

  // two instances: the default step size and a large one for saturation
  logic done_b, busy_b, w_sat_b;
  logic signed [AW-1:0] w_b [L];
  adaptive_weight_control #(.L(L), .X_W(XW), .A_W(AW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .e(e), .x_taps(x_taps),
    .w(w), .done(done), .busy(busy), .w_sat(w_sat)
  );
  adaptive_weight_control #(.L(L), .X_W(XW), .A_W(AW), .MU_SH(12)) dut_big (
    .clk(clk), .rst_n(rst_n), .start(start), .e(e), .x_taps(x_taps),
    .w(w_b), .done(done_b), .busy(busy_b), .w_sat(w_sat_b)
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
    static longint wb [] = new[L];
    e = '0;
    foreach (x_taps[i]) x_taps[i] = '0;
    foreach (wm[i]) begin wm[i] = 0; wb[i] = 0; end
    #12 rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      longint ev;
      int cyc;
      @(negedge clk);
      foreach (xm[i]) begin
        xm[i] = longint'($urandom_range(0, 65535)) - 32768;
        x_taps[i] = XW'(xm[i]);
      end
      ev = longint'($urandom_range(0, 65535)) - 32768;
      e = XW'(ev); start = 1;
      @(negedge clk) begin start = 0; e = '0; end
      cyc = 1;
      check("busy", longint'(busy), 1);
      while (!done && cyc < 40) begin @(negedge clk); cyc++; end
      check("update latency", longint'(cyc), 12);  // done 11 edges after the start edge
      update(wm, xm, ev, MU_SHIFT, AW);
      update(wb, xm, ev, 12, AW);
      foreach (w[i]) check("w", longint'(w[i]), wm[i]);
      foreach (w_b[i]) check("w big step", longint'(w_b[i]), wb[i]);
      if (w_sat_b) sat_seen++;
      check("idle after done", longint'(busy), 0);
    end
    check("saturation exercised", longint'(sat_seen > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
