// tb_lms_core: the LMS core identifying an unknown 8-tap FIR h. x(n) is
// random, d(n) = (h * x)(n). Every output y(n), e(n) and every weight is
// compared with the integer reference model; the error must fall by a
// factor of 8 between the first and the last 200 samples; the sample period
// must be 25 cycles with adaptation on and 2 with it off (weights frozen).
// in_valid is dropped at random to exercise the handshake.
module tb_lms_core;
  import mar_pkg::*;
  import lms_ref_pkg::*;
  localparam int L = 8, XW = 16, AW = 16, FR = 14, MU = 19;
  localparam int NS = 1500;

  logic clk = 0, rst_n = 0, adapt_en = 1, in_valid = 0, in_ready, out_valid;
  logic signed [XW-1:0] x_in = '0, d_in = '0, y_out, e_out;
  logic signed [AW-1:0] w [L];
  logic y_sat, e_sat, w_sat;
  int checks = 0, failures = 0;
  longint wm [] = new[L];
  longint xm [] = new[L];
  longint hm [] = new[L];
  longint err_first = 0, err_last = 0;
  int frozen = 0;

  lms_core #(.L(L), .X_W(XW), .A_W(AW), .FRAC(FR), .MU_SH(MU)) dut (
    .clk(clk), .rst_n(rst_n), .adapt_en(adapt_en), .in_valid(in_valid),
    .in_ready(in_ready), .x_in(x_in), .d_in(d_in), .out_valid(out_valid),
    .y_out(y_out), .e_out(e_out), .w(w), .y_sat(y_sat), .e_sat(e_sat), .w_sat(w_sat)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample period: cycles from an accepted sample until the core is ready
  // for the next one.
  int cyc = 0, last_acc = 0;
  logic last_adapt = 1, pending = 0;
  always @(posedge clk) begin
    cyc++;
    if (pending && in_ready) begin
      check("sample period", longint'(cyc) - longint'(last_acc), last_adapt ? 25 : 2);
      pending = 0;
    end
    if (in_valid && in_ready) begin
      last_acc = cyc;
      last_adapt = adapt_en;
      pending = 1;
    end
  end

  initial begin
    static longint hx [] = new[L];
    hm = '{4000, -3000, 2000, 1500, -1000, 600, 300, -200};
    foreach (xm[i]) begin xm[i] = 0; wm[i] = 0; hx[i] = 0; end
    #12 rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      longint xv, dv, yexp, eexp;
      int gap;
      // handshake gaps on some samples, adaptation frozen for a stretch
      gap = ($urandom_range(0, 3) == 0) ? int'($urandom_range(1, 5)) : 0;
      @(negedge clk);
      adapt_en = !(n >= 600 && n < 650);
      repeat (gap) @(negedge clk);
      xv = longint'($urandom_range(0, 16383)) - 8192;
      for (int i = L - 1; i > 0; i--) hx[i] = hx[i-1];
      hx[0] = xv;
      dv = 0;
      foreach (hm[i]) dv += hm[i] * hx[i];
      dv = dv >>> FR;
      x_in = XW'(xv); d_in = XW'(dv); in_valid = 1;
      do @(posedge clk); while (!in_ready);
      #1 in_valid = 0;
      wait (out_valid);
      for (int i = L - 1; i > 0; i--) xm[i] = xm[i-1];
      xm[0] = xv;
      yexp = fir(wm, xm, FR, XW);
      eexp = sat(dv - yexp, XW);
      check("y", longint'(y_out), yexp);
      check("e", longint'(e_out), eexp);
      if (n < 200) err_first += (eexp < 0) ? -eexp : eexp;
      if (n >= NS - 200) err_last += (eexp < 0) ? -eexp : eexp;
      if (adapt_en) update(wm, xm, eexp, MU, AW);
      else frozen++;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      foreach (w[i]) check("w", longint'(w[i]), wm[i]);
    end
    $display("mean |e| first 200 = %0d, last 200 = %0d", err_first / 200, err_last / 200);
    check("error reduced", longint'(err_last * 8 < err_first), 1);
    check("frozen samples seen", longint'(frozen > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
