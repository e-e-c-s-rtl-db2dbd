// tb_eecs_datapath: self-checking test of the datapath driven by hand-built
// control words.
//
// The testbench plays both the control unit (one control word per cycle) and
// the instruction ROM and data RAM (arrays here, the RAM with a one-cycle
// registered read). It keeps its own copy of the eight registers and checks,
// after each falling-edge write-back: register contents, PC updates (increment,
// branch relative to the branch's own address, register jump, forced return
// address, interrupt vector), the JAL link value, ALU flags, both shift
// directions, LUI, RAM address/data for ST, LD and RECV, the SEND pins, and
// the PC/IR scan chain.
module tb_eecs_datapath;
  import eecs_pkg::*;
  import eecs_asm_pkg::*;

  logic        clk = 1'b0, rst_n, scan_en, scan_in, scan_out;
  ctrl_t       ctrl;
  logic [15:0] rom_data, pc, ir, seq_next, ram_addr, ram_wdata, ram_rdata;
  logic [15:0] elev_data_in, elev_data_out;
  logic [7:0]  elev_addr_out;
  logic        ram_we, send_strobe;
  alu_flags_t  flags;
  logic [15:0] ram [1024];
  logic [15:0] R [8];
  int checks = 0, failures = 0;

  eecs_datapath dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (ram_we) ram[ram_addr[9:0]] <= ram_wdata;
    ram_rdata <= ram[ram_addr[9:0]];
  end

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

  function automatic ctrl_t idle();
    ctrl_t c;
    c = '0; c.pc_sel = PC_HOLD; c.alu_op = ALU_PASSB; c.b_sel = B_REG;
    c.imm_kind = IMM_ZEXT; c.res_sel = RES_ALU;
    return c;
  endfunction

  function automatic ctrl_t ex(input alu_op_e op, input bsel_e bs, input imm_e ik,
                               input res_e rs, input bit we);
    ctrl_t c;
    c = idle(); c.pc_sel = PC_INC; c.alu_op = op; c.b_sel = bs; c.imm_kind = ik;
    c.res_sel = rs; c.rf_we = we;
    return c;
  endfunction

  // Fetch ins, execute it with control word c, finish with the write-back.
  task automatic step(input logic [15:0] ins, input ctrl_t c);
    ctrl = idle(); ctrl.ir_load = 1'b1; rom_data = ins;
    @(posedge clk); #1;
    check(ir == ins, "IR load");
    ctrl = c;
    #1;
  endtask

  task automatic finish_step();
    @(posedge clk); #1;
    ctrl = idle();
    @(negedge clk); #1;
    for (int r = 0; r < 8; r++)
      check(dut.u_rf.regs[r] == R[r], $sformatf("R%0d=%h exp %h", r, dut.u_rf.regs[r], R[r]));
  endtask

  task automatic load_imm(input int r, input logic [7:0] v);
    step(MOVI(r, v), ex(ALU_PASSB, B_IMM, IMM_ZEXT, RES_ALU, 1));
    R[r] = {8'h00, v};
    finish_step();
  endtask

  initial begin
    logic [15:0] pc0;
    logic [31:0] got;
    rst_n = 0; scan_en = 0; scan_in = 0; ctrl = idle(); rom_data = 0; elev_data_in = 0;
    @(posedge clk); #1; rst_n = 1;
    foreach (R[r]) R[r] = dut.u_rf.regs[r];
    check(pc == 0 && ir == 0, "reset");
    for (int r = 0; r < 8; r++) load_imm(r, 8'(8'h11 * r + 3));
    check(pc == 8, $sformatf("PC after 8 instructions %h", pc));

    // LUI / ORI to build wide values
    step(LUI(1, 'h80), ex(ALU_PASSB, B_IMM, IMM_LUI, RES_ALU, 1)); R[1] = 16'h8000; finish_step();
    step(LUI(2, 'h7F), ex(ALU_PASSB, B_IMM, IMM_LUI, RES_ALU, 1)); R[2] = 16'h7F00; finish_step();
    // ADD with carry-free signed overflow: 0x7F00 + 0x7F00
    step(ADD(2, 2), ex(ALU_ADD, B_REG, IMM_ZEXT, RES_ALU, 1));
    check(flags.f && !flags.c, "ADD overflow flags");
    R[2] = 16'hFE00; finish_step();
    // SUB immediate, sign extended: R3 - (-1)
    step(SUBI(3, 'hFF), ex(ALU_SUB, B_IMM, IMM_SEXT, RES_ALU, 1)); R[3] = R[3] + 1; finish_step();
    // XOR, AND, MOV
    step(XOR_(4, 5), ex(ALU_XOR, B_REG, IMM_ZEXT, RES_ALU, 1)); R[4] = R[4] ^ R[5]; finish_step();
    step(AND_(2, 6), ex(ALU_AND, B_REG, IMM_ZEXT, RES_ALU, 1)); R[2] = R[2] & R[6]; finish_step();
    // CMP: flags only
    step(CMP(1, 5), ex(ALU_SUB, B_REG, IMM_ZEXT, RES_ALU, 0));
    check(!flags.z && !flags.l == (R[1] >= R[5]) && flags.n, "CMP flags");
    finish_step();
    // Shifts: LSHI right 5 of 0x8000, LSH by register value -3 and +4
    step(LSHI(1, 1, 5), ex(ALU_PASSB, B_IMM, IMM_ZEXT, RES_SHIFT, 1));
    ctrl.shift_imm = 1; #1; R[1] = R[1] >> 5; finish_step();
    load_imm(7, 8'hFD);
    step(MOVI(7, 0), ex(ALU_PASSB, B_IMM, IMM_ZEXT, RES_ALU, 1)); R[7] = 0; finish_step();
    step(SUBI(7, 3), ex(ALU_SUB, B_IMM, IMM_SEXT, RES_ALU, 1)); R[7] = 16'hFFFD; finish_step();
    step(LSH(1, 7), ex(ALU_PASSB, B_REG, IMM_ZEXT, RES_SHIFT, 1)); R[1] = R[1] >> 3; finish_step();
    load_imm(7, 4);
    step(LSH(3, 7), ex(ALU_PASSB, B_REG, IMM_ZEXT, RES_SHIFT, 1)); R[3] = R[3] << 4; finish_step();

    // ST R4 -> [R5], LD R6 <- [R5]
    step(ST(4, 5), ex(ALU_PASSB, B_REG, IMM_ZEXT, RES_ALU, 0));
    ctrl.ram_we = 1; #1;
    check(ram_we && ram_addr == R[5] && ram_wdata == R[4], "ST address/data");
    finish_step();
    step(LD(6, 5), ex(ALU_PASSB, B_REG, IMM_ZEXT, RES_MEM, 1)); R[6] = R[4]; finish_step();
    // RECV: [R0 + dev id 5] <- elev_data_in
    elev_data_in = 16'hC0DE;
    step(RECV(0), ex(ALU_ADD, B_DEVID, IMM_ZEXT, RES_ALU, 0));
    ctrl.ram_we = 1; ctrl.ram_from_dev = 1; ctrl.dev_id = 7'd5; #1;
    check(ram_addr == R[0] + 5 && ram_wdata == 16'hC0DE, "RECV address/data");
    finish_step();
    check(ram[R[0] + 5] == 16'hC0DE, "RECV stored");
    // SEND data R6 to elevator R2
    step(SEND(2, 6), idle());
    ctrl.pc_sel = PC_INC; ctrl.send = 1; #1;
    @(posedge clk); #1;
    check(send_strobe && elev_data_out == R[6] && elev_addr_out == {R[2][6:0], 1'b1}, "SEND pins");
    ctrl = idle();
    @(posedge clk); #1;
    check(!send_strobe && elev_data_out == R[6], "SEND strobe is one cycle, data held");

    // Branch: target is the branch's own address plus the displacement.
    pc0 = pc;
    step(BCND(CC_UC, -6), ex(ALU_ADD, B_IMM, IMM_SEXT, RES_ALU, 0));
    ctrl.a_pc = 1; ctrl.pc_sel = PC_BRANCH; #1;
    check(seq_next == pc0 - 6, "branch seq_next");
    finish_step();
    check(pc == pc0 - 6, $sformatf("branch target %h", pc));
    // JAL R5, R3: link and jump
    pc0 = pc;
    step(JAL(5, 3), ex(ALU_PASSB, B_REG, IMM_ZEXT, RES_LINK, 1));
    ctrl.pc_sel = PC_JUMP; #1;
    check(seq_next == R[3], "jump seq_next");
    R[5] = pc0 + 1; finish_step();
    check(pc == dut.u_rf.regs[3], "jump target");
    // Interrupt vector overrides, seq_next still shows the sequential PC.
    pc0 = pc;
    step(NOP(), ex(ALU_PASSB, B_REG, IMM_ZEXT, RES_ALU, 0));
    ctrl.int_take = 1; ctrl.int_vec = VEC_ELEV; #1;
    check(seq_next == pc0 + 1, "seq_next during interrupt");
    finish_step();
    check(pc == VEC_ELEV, "interrupt vector");
    // Return address
    step(RETX(), idle());
    ctrl.pc_sel = PC_FORCE; ctrl.pc_ret = pc0 + 1; #1;
    finish_step();
    check(pc == pc0 + 1, "forced return address");

    // Scan chain: 32 bits out (IR then PC, MSB first), new PC and IR in.
    scan_en = 1;
    for (int i = 0; i < 32; i++) begin
      got = {got[30:0], scan_out};
      scan_in = (i < 16) ? 1'(16'hABCD >> (15 - i)) : 1'(16'h0123 >> (31 - i));
      @(posedge clk); #1;
    end
    scan_en = 0;
    check(got == {16'h0000 | RETX(), pc0 + 16'd1}, $sformatf("scan out %h", got));
    check(ir == 16'hABCD && pc == 16'h0123, $sformatf("scan in ir=%h pc=%h", ir, pc));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
