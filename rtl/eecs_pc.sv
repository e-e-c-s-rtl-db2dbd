// eecs_pc: the positive-edge program counter with a scan path.
//
// In normal mode the PC loads d when load is high and otherwise holds. In scan
// mode (scan_en high) it becomes a shift register: every rising edge shifts
// scan_in in at bit 0 and moves bit 15 out on scan_out, so a tester can read
// the current address and force a new one. Reset (synchronous, active low)
// clears the PC to 0, this design's choice of start address.
module eecs_pc
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
