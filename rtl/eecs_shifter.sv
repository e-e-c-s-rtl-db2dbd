// eecs_shifter: 16-bit logarithmic shifter with flip-based right shifts.
//
// A single logarithmic left shifter (stages of 1, 2, 4 and 8 positions, each
// stage either passing its input or shifting it, filling with zeros) serves
// both directions. For a right shift the operand is first flipped (bit 15
// becomes bit 0, bit 14 bit 1, and so on), shifted left, and flipped back, so
// no second set of shift stages is needed. Right shifts are logical.
//
// Interface: din operand, amt shift distance 0..W-1, right selects the
// direction; dout is the result. Purely combinational.
module eecs_shifter
  import eecs_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0]         din,
  input  logic [$clog2(W)-1:0] amt,
  input  logic                 right,
  output logic [W-1:0]         dout
);

  localparam int unsigned S = $clog2(W);

  function automatic logic [W-1:0] flip(input logic [W-1:0] v);
    for (int i = 0; i < W; i++) flip[i] = v[W-1-i];
  endfunction

  logic [W-1:0] stage [S+1];

  assign stage[0] = right ? flip(din) : din;

  for (genvar s = 0; s < S; s++) begin : g_stage
    assign stage[s+1] = amt[s] ? (stage[s] << (1 << s)) : stage[s];
  end

  assign dout = right ? flip(stage[S]) : stage[S];

endmodule
