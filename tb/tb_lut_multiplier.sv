// tb_lut_multiplier: 16-bit signed sample times 16-bit signed coefficient
// through four APC-OMS digits and a real apc_oms_lut, against x*a. Corner
// values (+/-full scale, 0, -1) are included.
module tb_lut_multiplier;
  import mar_pkg::*;
  localparam int XW = 16, AW = 16, W = AW + 5, ND = 4;

  logic clk = 0, rst_n = 0, load = 0, ready;
  logic signed [XW-1:0] x;
  logic signed [AW-1:0] a;
  logic [3:0] addr [ND];
  logic signed [W-1:0] data [ND];
  logic signed [XW+AW-1:0] p;
  int checks = 0, failures = 0;

  apc_oms_lut #(.A_W(AW), .W(W), .NREAD(ND)) u_lut (
    .clk(clk), .rst_n(rst_n), .load(load), .a(a), .ready(ready), .raddr(addr), .rdata(data)
  );
  lut_multiplier #(.X_W(XW), .A_W(AW), .W(W), .ND(ND)) dut (
    .x(x), .a(a), .lut_addr(addr), .lut_data(data), .p(p)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int corners [6] = '{-32768, 32767, 0, -1, 1, 12345};
    x = '0; a = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      int av;
      av = (n < 6) ? corners[n] : int'($urandom_range(0, 65535)) - 32768;
      @(negedge clk) begin a = AW'(av); load = 1; end
      @(negedge clk) load = 0;
      while (!ready) @(negedge clk);
      for (int m = 0; m < 60; m++) begin
        int xv;
        longint expv;
        xv = (m < 6) ? corners[m] : int'($urandom_range(0, 65535)) - 32768;
        x = XW'(xv);
        #1;
        expv = longint'(xv) * longint'(av);
        checks++;
        if (longint'(p) != expv) begin
          failures++;
          $display("FAIL x=%0d a=%0d p=%0d exp=%0d", xv, av, p, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
