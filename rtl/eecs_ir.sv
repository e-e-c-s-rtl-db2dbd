// eecs_ir: the positive-edge instruction register with a scan path.
//
// In normal mode the IR loads the instruction word from the ROM pins when load
// is high. In scan mode (scan_en high) every rising edge shifts scan_in in at
// bit 0 and bit 15 out on scan_out, so a tester can read the instruction held
// and force a specific instruction to be executed. Reset (synchronous, active
// low) clears the IR, which decodes as a no-operation.
module eecs_ir
  import eecs_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  input  logic         scan_en,
  input  logic         scan_in,
  output logic         scan_out
);

  always_ff @(posedge clk) begin
    if (!rst_n)       q <= '0;
    else if (scan_en) q <= {q[W-2:0], scan_in};
    else if (load)    q <= d;
  end

  assign scan_out = q[W-1];

endmodule
