// tb_apc_oms_barrel_shifter: all shift amounts and RESET for random signed
// words, compared with multiplication by 2^s.
module tb_apc_oms_barrel_shifter;
  localparam int W = 21;
  logic signed [W-1:0] word, out;
  logic [1:0] s;
  logic reset;
  int checks = 0, failures = 0;

  apc_oms_barrel_shifter #(.W(W)) dut (.word(word), .s(s), .reset(reset), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int w, expv;
      // values up to +/-16*2^15 keep every shift inside W bits
      w = int'($urandom_range(0, 2 * 65535)) - 65535;
      word = W'(w);
      s = 2'(n % 4);
      reset = (n % 7 == 3);
      #1;
      expv = reset ? 0 : w * (1 << (n % 4));
      checks++;
      if (int'(out) != expv) begin
        failures++;
        $display("FAIL word=%0d s=%0d reset=%0b out=%0d exp=%0d", w, s, reset, out, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
