// eecs_ram: the on-chip data RAM of the E.E.C.S. controller.
//
// A single-port synchronous RAM of DEPTH words (512K by default, the design's
// size). A write takes place at the rising edge when we is high; a read
// registers the word at addr on every rising edge, so the data appears on
// rdata one cycle after the address. The design takes its RAM from a
// standard-cell library; this behaviour (single port, registered read,
// no reset of the contents) is this design's choice.
module eecs_ram
  import eecs_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  parameter int unsigned DEPTH = RAM_DEPTH
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
