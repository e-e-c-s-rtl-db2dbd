// tb_eecs_ram: self-checking test of the data RAM at its full 512K-word size.
// Writes random words to random addresses (including the first and last
// word), reads them back and checks the one-cycle registered read latency
// against a reference associative array.
module tb_eecs_ram;
  localparam int unsigned DEPTH = 524288;
  logic        clk = 1'b0, we;
  logic [18:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [int];
  int checks = 0, failures = 0;

  eecs_ram dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned addrs[$];
    we = 1'b0; addr = '0; wdata = '0;
    addrs.push_back(0);
    addrs.push_back(DEPTH - 1);
    repeat (1000) addrs.push_back($urandom_range(0, DEPTH - 1));
    foreach (addrs[i]) begin
      @(negedge clk);
      we = 1'b1; addr = 19'(addrs[i]); wdata = 16'($urandom);
      model[addrs[i]] = wdata;
    end
    @(negedge clk); we = 1'b0;
    foreach (addrs[i]) begin
      addr = 19'(addrs[i]);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[addrs[i]]) begin
        failures++;
        $display("FAIL addr=%h got=%h exp=%h", addrs[i], rdata, model[addrs[i]]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
