// eecs_regfile: the 8-word by 16-bit register file of the E.E.C.S. datapath.
//
// Two read ports are combinational. The single write port is written on the
// falling edge of the clock, as in the design: the control unit issues a
// write during an execute cycle, the datapath holds the result in a register
// at the following rising edge, and the register file takes it at the falling
// edge in the middle of the next cycle, well before the next instruction
// reads its operands. The registers are not reset; software writes a register
// before reading it.
//
// Interface: ra/rb read addresses with qa/qb data; we, wa, wd the write port.
module eecs_regfile
  import eecs_pkg::*;
#(
  parameter int unsigned W = DATA_W,
  parameter int unsigned N = NREGS
) (
  input  logic                 clk,
  input  logic [$clog2(N)-1:0] ra,
  input  logic [$clog2(N)-1:0] rb,
  output logic [W-1:0]         qa,
  output logic [W-1:0]         qb,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  logic [W-1:0]         wd
);

  logic [W-1:0] regs [N];

  always_ff @(negedge clk) begin
    if (we) regs[wa] <= wd;
  end

  assign qa = regs[ra];
  assign qb = regs[rb];

endmodule
