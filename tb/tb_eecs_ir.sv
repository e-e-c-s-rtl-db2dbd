// tb_eecs_ir: self-checking test of the IR register with its scan path.
// Checks reset to zero, parallel load on the rising edge, hold when load is
// low, and in scan mode a 16-bit serial shift: the old contents come out on
// scan_out, most significant bit first, while a new value shifts in.
module tb_eecs_ir;
  logic        clk = 1'b0, rst_n, load, scan_en, scan_in, scan_out;
  logic [15:0] d, q, shifted_out, expect_q;
  int checks = 0, failures = 0;

  eecs_ir dut (.clk, .rst_n, .load, .d, .q, .scan_en, .scan_in, .scan_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s q=%h exp=%h", what, q, e);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b1; d = 16'hABCD; scan_en = 1'b0; scan_in = 1'b0;
    @(posedge clk); #1;
    check(16'h0000, "reset");
    rst_n = 1'b1;
    repeat (100) begin
      d = 16'($urandom); load = 1'($urandom);
      expect_q = load ? d : q;
      @(posedge clk); #1;
      check(expect_q, "load/hold");
    end
    repeat (20) begin
      logic [15:0] newv, oldv;
      newv = 16'($urandom); oldv = q;
      scan_en = 1'b1; load = 1'b1; d = 16'hFFFF;
      for (int i = 15; i >= 0; i--) begin
        shifted_out[i] = scan_out;
        scan_in = newv[i];
        @(posedge clk); #1;
      end
      scan_en = 1'b0; load = 1'b0;
      checks++;
      if (shifted_out !== oldv) begin
        failures++;
        $display("FAIL scan out %h exp %h", shifted_out, oldv);
      end
      check(newv, "scan in");
      @(posedge clk); #1;
      check(newv, "hold after scan");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
