// tb_apc_oms_lut: loads random coefficients into the 9-word table and checks
// that ready is low for exactly 9 cycles after the load pulse, and that the
// words read back as A, 3A, ..., 15A, 2A on two read ports. Also checks a
// restart of the fill while one is in progress.
module tb_apc_oms_lut;
  import mar_pkg::*;
  localparam int AW = 16, W = AW + 5;

  logic clk = 0, rst_n = 0, load = 0;
  logic signed [AW-1:0] a;
  logic ready;
  logic [3:0] raddr [2];
  logic signed [W-1:0] rdata [2];
  int checks = 0, failures = 0;

  apc_oms_lut #(.A_W(AW), .W(W), .NREAD(2)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .a(a), .ready(ready),
    .raddr(raddr), .rdata(rdata)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic verify(input int av);
    for (int k = 0; k < 9; k++) begin
      raddr[0] = 4'(k); raddr[1] = 4'(8 - k);
      #1;
      check($sformatf("word %0d", k), int'(rdata[0]), (k == 8) ? 2 * av : (2 * k + 1) * av);
      check($sformatf("word %0d p1", 8 - k), int'(rdata[1]), (k == 0) ? 2 * av : (2 * (8 - k) + 1) * av);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; raddr[0] = '0; raddr[1] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    check("ready after reset", int'(ready), 1);
    verify(0);
    for (int n = 0; n < 20; n++) begin
      int av, cyc;
      av = (n == 0) ? -32768 : (n == 1) ? 32767 : int'($urandom_range(0, 65535)) - 32768;
      @(negedge clk);
      if (n == 5) begin            // start a fill, then restart it
        a = AW'(1234); load = 1;
        @(negedge clk) load = 0;
        repeat (3) @(negedge clk);
      end
      a = AW'(av); load = 1;
      @(negedge clk);
      load = 0; a = '0;
      cyc = 1;
      while (!ready && cyc < 50) begin @(negedge clk); cyc++; end
      check("fill cycles", cyc, 10);   // 9 busy cycles, ready in the 10th
      verify(av);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
