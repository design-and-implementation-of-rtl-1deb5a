// tb_apc_oms_addr_gen: exhaustive check of the APC-OMS address generator.
// For all 32 input digits the expected X', shift count, LUT address, RESET
// and add/sub control are worked out arithmetically: X' from the
// anti-symmetric coding, the shift as the number of trailing zeros of X'
// (3 for X' = 0, which reads 2A), and the address of an odd multiple m*A as
// (m-1)/2, or 8 for X' = 0.
module tb_apc_oms_addr_gen;
  import mar_pkg::*;

  logic [4:0] x;
  logic [3:0] xp, d;
  logic [1:0] s;
  logic       reset, add;
  int checks = 0, failures = 0;

  apc_oms_addr_gen dut (.x(x), .xp(xp), .d(d), .s(s), .reset(reset), .add(add));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL x=%05b %s: got %0d expected %0d", x, what, got, exp);
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
    for (int v = 0; v < 32; v++) begin
      int e_xp, e_tz, e_odd, e_d;
      x = 5'(v);
      #1;
      e_xp = (v >= 16) ? (v - 16) : ((16 - v) % 16);
      e_tz = 0;
      e_odd = e_xp;
      if (e_xp == 0) e_tz = 3;
      else while (e_odd % 2 == 0) begin e_odd /= 2; e_tz++; end
      e_d = (e_xp == 0) ? 8 : (e_odd - 1) / 2;
      check("xp", int'(xp), e_xp);
      check("s", int'(s), e_tz);
      check("d", int'(d), e_d);
      check("reset", int'(reset), int'(v == 16));
      check("add", int'(add), int'(v >= 16));
      // Reconstruction: 16 +/- (stored odd multiple << shift) equals v.
      begin
        int stored, apc, prod;
        stored = (d == 8) ? 2 : 2 * int'(d) + 1;
        apc = reset ? 0 : stored << s;
        prod = add ? 16 + apc : 16 - apc;
        check("product/A", prod, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
