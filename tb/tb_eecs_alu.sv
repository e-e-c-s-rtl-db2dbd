// tb_eecs_alu: self-checking test of the ripple-carry ALU.
// Applies directed corner cases and random operands for every operation and
// compares result and flags with values computed here from wide arithmetic.
module tb_eecs_alu;
  import eecs_pkg::*;

  logic [15:0] a, b, y;
  alu_op_e     op;
  alu_flags_t  flags;
  int checks = 0, failures = 0;

  eecs_alu dut (.a, .b, .op, .y, .flags);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [15:0] ta, input logic [15:0] tb_, input alu_op_e top);
    logic [16:0] wide;
    logic [15:0] ey;
    logic        ec, ef;
    a = ta; b = tb_; op = top;
    #1;
    ec = 1'b0; ef = 1'b0;
    case (top)
      ALU_ADD: begin
        wide = {1'b0, ta} + {1'b0, tb_}; ey = wide[15:0]; ec = wide[16];
        ef = ($signed(ta) + $signed(tb_) > 32767) || ($signed(ta) + $signed(tb_) < -32768);
      end
      ALU_SUB: begin
        ey = ta - tb_; ec = (ta < tb_);
        ef = ($signed(ta) - $signed(tb_) > 32767) || ($signed(ta) - $signed(tb_) < -32768);
      end
      ALU_AND: ey = ta & tb_;
      ALU_OR:  ey = ta | tb_;
      ALU_XOR: ey = ta ^ tb_;
      default: ey = tb_;
    endcase
    checks++;
    if (y !== ey) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", top.name(), ta, tb_, y, ey);
    end
    if (top == ALU_ADD || top == ALU_SUB) begin
      checks++;
      if (flags.c !== ec || flags.f !== ef) begin
        failures++;
        $display("FAIL flags op=%s a=%h b=%h c=%b f=%b exp c=%b f=%b", top.name(), ta, tb_, flags.c, flags.f, ec, ef);
      end
    end
    if (top == ALU_SUB) begin
      checks++;
      if (flags.z !== (ta == tb_) || flags.l !== (ta < tb_) ||
          flags.n !== ($signed(ta) < $signed(tb_))) begin
        failures++;
        $display("FAIL cmp a=%h b=%h zln=%b%b%b", ta, tb_, flags.z, flags.l, flags.n);
      end
    end
  endtask

  initial begin
    alu_op_e ops[6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB};
    logic [15:0] corners[6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h1234};
    foreach (ops[k])
      foreach (corners[i])
        foreach (corners[j]) check_one(corners[i], corners[j], ops[k]);
    repeat (3000) check_one(16'($urandom), 16'($urandom), ops[$urandom_range(0, 5)]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
