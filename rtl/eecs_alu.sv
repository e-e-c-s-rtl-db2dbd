// eecs_alu: the 16-bit arithmetic/logic unit of the E.E.C.S. datapath.
//
// Arithmetic goes through a ripple-carry adder: a chain of one-bit full-adder
// slices, each slice's carry feeding the next, as the design trades speed for
// area (the ripple is the chip's critical path). Subtraction and compare add
// the inverted B operand with a carry-in of 1. AND, OR and XOR are bitwise;
// PASSB forwards operand B (used by MOV, LUI and for address generation).
//
// Interface: a, b operands; op selects the operation; y is the result and
// flags the condition flags. Purely combinational.
//
// Flags (this design's own definition): c = carry out for ADD, borrow
// (a < b unsigned) for SUB; f = signed overflow of ADD/SUB; z = a equals b;
// l = a < b unsigned; n = a < b signed. The control unit decides which
// instructions store which flags.
module eecs_alu
  import eecs_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_e      op,
  output logic [W-1:0] y,
  output alu_flags_t   flags
);

  logic         sub;
  logic [W-1:0] bx;
  logic [W:0]   carry;
  logic [W-1:0] sum;

  assign sub      = (op == ALU_SUB);
  assign bx       = sub ? ~b : b;
  assign carry[0] = sub;

  // Ripple-carry chain of full-adder slices.
  for (genvar i = 0; i < W; i++) begin : g_slice
    assign sum[i]     = a[i] ^ bx[i] ^ carry[i];
    assign carry[i+1] = (a[i] & bx[i]) | (carry[i] & (a[i] ^ bx[i]));
  end

  logic ovf;
  assign ovf = (a[W-1] == bx[W-1]) && (sum[W-1] != a[W-1]);

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = sum;
      ALU_AND:          y = a & b;
      ALU_OR:           y = a | b;
      ALU_XOR:          y = a ^ b;
      default:          y = b;
    endcase
  end

  always_comb begin
    flags.c = sub ? ~carry[W] : carry[W];
    flags.f = ovf;
    flags.z = (a == b);
    flags.l = sub ? ~carry[W] : (a < b);
    flags.n = sub ? (sum[W-1] ^ ovf) : ($signed(a) < $signed(b));
  end

endmodule
