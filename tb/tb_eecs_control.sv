// tb_eecs_control: self-checking test of the control unit on its own.
//
// The testbench plays the datapath: it presents instructions on ir, ALU flags
// and a sequential next PC, and checks the control word the unit produces in
// each fetch and execute cycle. Covered: alternation of fetch and execute
// (two cycles per instruction), decoding of every instruction group, which
// instructions store which flags, all sixteen branch conditions against
// flags computed here, EI/DI and busbusy, elevator and hall interrupt vectors,
// elevator precedence, saving and restoring PC and PSR through RETX, the
// device id used by RECV, and the scan-mode hold.
module tb_eecs_control;
  import eecs_pkg::*;
  import eecs_asm_pkg::*;

  logic        clk = 1'b0, rst_n, scan_en, irq0, irq1;
  logic [15:0] ir, seq_next;
  logic [7:0]  irq_addr;
  alu_flags_t  flags;
  ctrl_t       ctrl;
  psr_t        psr;
  logic        busbusy;
  int checks = 0, failures = 0;

  eecs_control dut (.clk, .rst_n, .scan_en, .ir, .seq_next, .flags, .irq0, .irq1,
                    .irq_addr, .ctrl, .psr, .busbusy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // One instruction: a fetch cycle then an execute cycle. The control word of
  // the execute cycle is returned, sampled just before the closing edge.
  task automatic run(input logic [15:0] ins, input alu_flags_t f, output ctrl_t c);
    check(ctrl.ir_load && ctrl.pc_sel == PC_HOLD && !ctrl.rf_we && !ctrl.ram_we,
          "fetch cycle control word");
    ir = ins; flags = f;
    @(posedge clk); #1;
    check(!ctrl.ir_load, $sformatf("execute cycle after fetch (%h)", ins));
    c = ctrl;
    @(posedge clk); #1;
  endtask

  function automatic bit cond(input int cc, input alu_flags_t f);
    bit r[16];
    r = '{f.z, !f.z, f.c, !f.c, !f.l && !f.z, f.l || f.z, !f.n && !f.z, f.n || f.z,
          f.f, !f.f, f.l, !f.l, f.n, !f.n, 1'b1, 1'b0};
    return r[cc];
  endfunction

  initial begin
    ctrl_t       c;
    alu_flags_t  f, fz;
    fz = '0;
    rst_n = 0; scan_en = 0; irq0 = 0; irq1 = 0; irq_addr = 0; ir = 0; seq_next = 16'h0101; flags = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(busbusy, "busbusy high after reset");

    // Decoding.
    run(ADD(1, 2), fz, c);
    check(c.alu_op == ALU_ADD && c.b_sel == B_REG && c.rf_we && c.res_sel == RES_ALU &&
          c.pc_sel == PC_INC && !c.ram_we, "ADD");
    run(SUBI(3, 5), fz, c);
    check(c.alu_op == ALU_SUB && c.b_sel == B_IMM && c.imm_kind == IMM_SEXT && c.rf_we, "SUBI");
    run(CMP(1, 2), fz, c);
    check(c.alu_op == ALU_SUB && !c.rf_we, "CMP writes no register");
    run(ANDI(1, 'hF0), fz, c);
    check(c.alu_op == ALU_AND && c.imm_kind == IMM_ZEXT && c.rf_we, "ANDI");
    run(ORI(1, 1), fz, c);   check(c.alu_op == ALU_OR  && c.b_sel == B_IMM, "ORI");
    run(XOR_(1, 2), fz, c);  check(c.alu_op == ALU_XOR && c.b_sel == B_REG, "XOR");
    run(MOVI(4, 7), fz, c);  check(c.alu_op == ALU_PASSB && c.b_sel == B_IMM && c.rf_we, "MOVI");
    run(LUI(4, 7), fz, c);   check(c.imm_kind == IMM_LUI && c.rf_we, "LUI");
    run(LSHI(2, 1, 3), fz, c); check(c.res_sel == RES_SHIFT && c.shift_imm && c.rf_we, "LSHI");
    run(LSH(2, 3), fz, c);   check(c.res_sel == RES_SHIFT && !c.shift_imm && c.rf_we, "LSH");
    run(LD(2, 3), fz, c);    check(c.res_sel == RES_MEM && c.rf_we && !c.ram_we && c.alu_op == ALU_PASSB, "LD");
    run(ST(2, 3), fz, c);    check(c.ram_we && !c.rf_we && !c.ram_from_dev, "ST");
    run(JAL(6, 1), fz, c);   check(c.pc_sel == PC_JUMP && c.res_sel == RES_LINK && c.rf_we, "JAL");
    run(SEND(3, 4), fz, c);  check(c.send && !c.rf_we && !c.ram_we, "SEND");
    run(NOP(), fz, c);       check(!c.rf_we && !c.ram_we && !c.send && c.pc_sel == PC_INC, "NOP");

    // Flags: ADD stores C and F only, CMP stores Z, L and N only.
    run(ADD(1, 2), '{c:1, f:1, z:1, l:1, n:1}, c);
    check(psr.fl == '{c:1, f:1, z:0, l:0, n:0}, $sformatf("ADD flags %b", psr.fl));
    run(CMPI(1, 2), '{c:0, f:0, z:1, l:1, n:1}, c);
    check(psr.fl == '{c:1, f:1, z:1, l:1, n:1}, $sformatf("CMP flags %b", psr.fl));
    run(MOV(1, 2), '0, c);
    check(psr.fl == '{c:1, f:1, z:1, l:1, n:1}, "MOV leaves flags");

    // Every condition with random flag settings.
    repeat (64) begin
      f = alu_flags_t'($urandom);
      run(ADD(0, 0), f, c);
      run(CMP(0, 0), f, c);
      for (int cc = 0; cc < 16; cc++) begin
        run(BCND(cond_e'(cc), 8'hF0), fz, c);
        check((c.pc_sel == PC_BRANCH) == cond(cc, f) && c.a_pc && c.alu_op == ALU_ADD &&
              c.imm_kind == IMM_SEXT, $sformatf("Bcond %0d flags %b", cc, f));
        run(JCND(cond_e'(cc), 2), fz, c);
        check((c.pc_sel == PC_JUMP) == cond(cc, f), $sformatf("Jcond %0d flags %b", cc, f));
      end
    end

    // Interrupts are refused while disabled.
    irq0 = 1; irq_addr = {7'd3, 1'b1};
    run(NOP(), fz, c);
    check(!c.int_take && busbusy, "no interrupt while disabled");
    // EI: enables, but the EI itself is not interrupted.
    run(EI(), fz, c);
    check(!c.int_take && !busbusy, "EI");
    // Elevator request taken at the end of the next instruction.
    seq_next = 16'h0456;
    run(ADD(1, 1), '{c:1, f:0, z:0, l:0, n:0}, c);
    check(c.int_take && c.int_vec == VEC_ELEV, $sformatf("elevator vector %h", c.int_vec));
    check(busbusy, "busbusy after acceptance");
    irq0 = 0; irq_addr = 8'h00;
    run(RECV(7), fz, c);
    check(c.ram_we && c.ram_from_dev && c.b_sel == B_DEVID && c.alu_op == ALU_ADD &&
          c.dev_id == 7'd3, $sformatf("RECV dev id %0d", c.dev_id));
    run(ADD(1, 1), '0, c);   // ISR clobbers C
    check(psr.fl.c == 0, "ISR changed C");
    run(RETX(), fz, c);
    check(c.pc_sel == PC_FORCE && c.pc_ret == 16'h0456, $sformatf("RETX target %h", c.pc_ret));
    check(!busbusy && psr.fl.c == 1, "RETX restores PSR");

    // Hall call: one vector per button.
    irq1 = 1; irq_addr = {7'd37, 1'b0};
    run(NOP(), fz, c);
    check(c.int_take && c.int_vec == 16'hFE00 + 16'd74, $sformatf("hall vector %h", c.int_vec));
    irq1 = 0;
    run(RETX(), fz, c);
    // Both at once: the elevator wins.
    irq0 = 1; irq1 = 1; irq_addr = {7'd9, 1'b1};
    run(NOP(), fz, c);
    check(c.int_take && c.int_vec == VEC_ELEV, "elevator precedence");
    irq0 = 0; irq_addr = {7'd5, 1'b0};
    run(RETX(), fz, c);
    check(!c.int_take, "RETX is not interrupted");
    run(NOP(), fz, c);
    check(c.int_take && c.int_vec == 16'hFE0A, "pending hall call served after");
    irq1 = 0;
    run(RETX(), fz, c);
    // DI closes the bus.
    run(DI(), fz, c);
    check(busbusy, "DI sets busbusy");
    irq1 = 1;
    run(NOP(), fz, c);
    check(!c.int_take, "no interrupt after DI");
    irq1 = 0;

    // Scan mode: nothing is fetched or executed; afterwards the IR executes.
    scan_en = 1;
    repeat (5) begin
      @(posedge clk); #1;
      check(!ctrl.ir_load && !ctrl.rf_we && ctrl.pc_sel == PC_HOLD, "scan hold");
    end
    ir = MOVI(2, 1);
    scan_en = 0; #1;
    check(!ctrl.ir_load && ctrl.rf_we && ctrl.pc_sel == PC_INC, "execute after scan");
    @(posedge clk); #1;
    check(ctrl.ir_load, "fetch follows");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
