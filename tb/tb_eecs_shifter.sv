// tb_eecs_shifter: self-checking test of the logarithmic shifter.
// Every distance in both directions on directed and random data, compared
// with the language's own shift operators.
module tb_eecs_shifter;
  logic [15:0] din, dout, exp_v;
  logic [3:0]  amt;
  logic        right;
  int checks = 0, failures = 0;

  eecs_shifter dut (.din, .amt, .right, .dout);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      din = (n == 0) ? 16'hFFFF : (n == 1) ? 16'h8001 : 16'($urandom);
      for (int d = 0; d < 2; d++) begin
        for (int s = 0; s < 16; s++) begin
          right = d[0]; amt = s[3:0];
          #1;
          exp_v = right ? (din >> s) : (din << s);
          checks++;
          if (dout !== exp_v) begin
            failures++;
            $display("FAIL din=%h amt=%0d right=%b got=%h exp=%h", din, s, right, dout, exp_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
