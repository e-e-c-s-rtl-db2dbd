// tb_eecs_regfile: self-checking test of the 8 x 16 register file.
// Writes random data to random registers and checks both read ports against a
// reference array. Also checks that a write lands on the falling edge: the
// value must not be visible just after the rising edge and must be visible
// after the falling edge.
module tb_eecs_regfile;
  logic        clk = 1'b0;
  logic [2:0]  ra, rb, wa;
  logic [15:0] qa, qb, wd;
  logic        we;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  eecs_regfile dut (.clk, .ra, .rb, .qa, .qb, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; wa = '0; wd = '0; ra = '0; rb = '0;
    // Initialise every register.
    for (int r = 0; r < 8; r++) begin
      @(posedge clk); #1;
      we = 1'b1; wa = 3'(r); wd = 16'(r * 16'h1111); model[r] = wd;
    end
    @(posedge clk); #1; we = 1'b0;
    repeat (500) begin
      @(posedge clk); #1;
      we = 1'($urandom); wa = 3'($urandom); wd = 16'($urandom);
      ra = wa; rb = 3'($urandom);
      // Before the falling edge the old contents are still read.
      #1;
      checks++;
      if (qa !== model[ra] || qb !== model[rb]) begin
        failures++;
        $display("FAIL early read ra=%0d qa=%h exp=%h rb=%0d qb=%h exp=%h", ra, qa, model[ra], rb, qb, model[rb]);
      end
      @(negedge clk); #1;
      if (we) model[wa] = wd;
      checks++;
      if (qa !== model[ra] || qb !== model[rb]) begin
        failures++;
        $display("FAIL read ra=%0d qa=%h exp=%h rb=%0d qb=%h exp=%h", ra, qa, model[ra], rb, qb, model[rb]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
