// tb_apc_oms_addsub: 16A + v and 16A - v for random signed A and v.
module tb_apc_oms_addsub;
  localparam int AW = 16, W = AW + 5;
  logic signed [AW-1:0] a;
  logic signed [W-1:0]  sh, out;
  logic add;
  int checks = 0, failures = 0;

  apc_oms_addsub #(.A_W(AW), .W(W)) dut (.a(a), .shifted(sh), .add(add), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int av, v, expv;
      av = int'($urandom_range(0, 65535)) - 32768;
      v  = av * int'($urandom_range(0, 16));
      a = AW'(av); sh = W'(v); add = n[0];
      #1;
      expv = add ? 16 * av + v : 16 * av - v;
      checks++;
      if (int'(out) != expv) begin
        failures++;
        $display("FAIL a=%0d v=%0d add=%0b out=%0d exp=%0d", av, v, add, out, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
