// tb_apc_oms_unit: one APC-OMS digit multiplier against X*A for every 5-bit
// X and random signed A. The 9-word table is modelled here directly as
// word d = (2d+1)*A for d < 8 and 2A for d = 8.
module tb_apc_oms_unit;
  import mar_pkg::*;
  localparam int AW = 16, W = AW + 5;

  logic [4:0] x;
  logic signed [AW-1:0] a;
  logic [3:0] addr;
  logic signed [W-1:0] data, p;
  int checks = 0, failures = 0;
  int av;

  apc_oms_unit #(.A_W(AW), .W(W)) dut (.x(x), .a(a), .lut_addr(addr), .lut_data(data), .p(p));

  always_comb data = (addr == 4'd8) ? W'(2 * av) : (addr < 4'd8) ? W'((2 * int'(addr) + 1) * av) : '0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      av = (n == 0) ? 1 : (n == 1) ? -32768 : (n == 2) ? 32767 : int'($urandom_range(0, 65535)) - 32768;
      a = AW'(av);
      for (int v = 0; v < 32; v++) begin
        x = 5'(v);
        #1;
        checks++;
        if (int'(p) != v * av) begin
          failures++;
          $display("FAIL x=%0d a=%0d p=%0d exp=%0d", v, av, p, v * av);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
