// tb_eecs_top: end-to-end test of the E.E.C.S. controller at its full size
// (512K-word RAM, no parameter overrides).
//
// A program in a testbench ROM exercises every instruction group: arithmetic,
// logic, both shift directions, LUI, load/store, branches taken and not taken,
// register jumps, JAL, EI/DI, SEND and RECV. Elevator and hall-call devices
// raise interrupts during a polling loop, once both at the same moment (the
// elevator must win and the hall call be served after it), and once while
// interrupts are disabled (busbusy high: the request must wait). At the end
// the PC and IR are scanned out and a new address and instruction scanned in
// and executed.
//
// An instruction-level reference model, written here from the instruction
// set definition, steps once per execute cycle with the same interrupt inputs
// and is compared with the chip after every instruction: PC, IR, all eight
// registers, SEND pins, and at the end the RAM. It also checks that each
// instruction takes two clock cycles, and counts how often each mechanism
// happened; a mechanism that never happened counts as a failure.
module tb_eecs_top;
  import eecs_pkg::*;
  import eecs_asm_pkg::*;

  logic        clk = 1'b0, rst_n;
  logic [15:0] rom_addr, rom_data, ir_out;
  logic        irq0, irq1, busbusy, send_strobe, scan_en, scan_in, scan_out;
  logic [7:0]  irq_addr, elev_addr_out;
  logic [15:0] elev_data_in, elev_data_out;

  eecs_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired at pc %h busbusy %b", rom_addr, busbusy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- program
  logic [15:0] rom [65536];
  assign rom_data = rom[rom_addr];

  localparam logic [15:0] HALL_COMMON = 16'hFF00;
  localparam logic [15:0] SUBR        = 16'h0030;
  localparam logic [15:0] HALT        = 16'h0027;
  localparam logic [15:0] SCAN_PC     = 16'h0200;

  initial begin
    foreach (rom[i]) rom[i] = NOP();
    rom[16'h00] = MOVI(7, 'h80);        // RECV base
    rom[16'h01] = LUI (4, 8'hFF);        // r4 = hall handler address
    rom[16'h02] = MOVI(3, 'h05);        // elevator to dispatch
    rom[16'h03] = MOVI(6, 0);
    rom[16'h04] = MOVI(5, 0);
    rom[16'h05] = MOVI(0, 'h34);
    rom[16'h06] = LUI (1, 8'h12);
    rom[16'h07] = OR_ (1, 0);            // 0x1234
    rom[16'h08] = ADDI(1, -1);           // 0x1233, carry out
    rom[16'h09] = MOVI(2, 'h40);
    rom[16'h0A] = ST  (1, 2);
    rom[16'h0B] = LD  (0, 2);
    rom[16'h0C] = LSHI(0, 0, 4);
    rom[16'h0D] = LSHI(0, 1, 3);
    rom[16'h0E] = MOVI(1, 0);
    rom[16'h0F] = SUBI(1, 2);            // -2, borrow
    rom[16'h10] = LSH (0, 1);            // right by 2
    rom[16'h11] = MOVI(1, 3);
    rom[16'h12] = LSH (0, 1);            // left by 3
    rom[16'h13] = XORI(0, 'h5A);
    rom[16'h14] = ANDI(0, 'hF7);
    rom[16'h15] = SEND(3, 0);
    rom[16'h16] = MOVI(2, 0);
    rom[16'h17] = EI();
    rom[16'h18] = ADDI(2, 1);            // polling loop
    rom[16'h19] = CMPI(2, 'h60);
    rom[16'h1A] = BCND(CC_NE, -2);
    rom[16'h1B] = DI();
    rom[16'h1C] = MOVI(1, int'(SUBR[7:0]));
    rom[16'h1D] = JAL (0, 1);
    rom[16'h1E] = CMP (0, 1);
    rom[16'h1F] = BCND(CC_LT, 2);
    rom[16'h20] = MOVI(2, 'hEE);        // skipped
    rom[16'h21] = SUB (1, 0);
    rom[16'h22] = AND_(1, 3);
    rom[16'h23] = MOV (2, 1);
    rom[16'h24] = CMPI(2, 0);
    rom[16'h25] = BCND(CC_EQ, 2);
    rom[16'h26] = ADD (2, 2);
    rom[HALT]   = BCND(CC_UC, 0);
    rom[SUBR+0] = ORI (5, 8'h01);
    rom[SUBR+1] = MOVI(1, 'h20);
    rom[SUBR+2] = JCND(CC_UC, 0);
    // Elevator status ISR: store the elevator's word, count, return.
    rom[VEC_ELEV+0] = RECV(7);
    rom[VEC_ELEV+1] = ADDI(6, 1);
    rom[VEC_ELEV+2] = RETX();
    // Hall-call vectors: load the button number, go to the common handler,
    // which dispatches elevator r3 to it.
    for (int k = 0; k < 128; k++) begin
      rom[VEC_HALL_BASE + 16'(2*k)]     = MOVI(5, k);
      rom[VEC_HALL_BASE + 16'(2*k + 1)] = JCND(CC_UC, 4);
    end
    rom[HALL_COMMON+0] = SEND(3, 5);
    rom[HALL_COMMON+1] = ADDI(6, 'h10);
    rom[HALL_COMMON+2] = RETX();
    rom[SCAN_PC+1]     = BCND(CC_UC, 0);
  end

  // ---------------------------------------------------------- reference model
  logic [15:0] R [8];
  logic [15:0] m_pc, m_epc;
  psr_t        m_psr, m_epsr;
  logic [7:0]  m_int_addr;
  logic [15:0] mem [int];
  bit          send_due;
  logic [15:0] exp_send_data;
  logic [7:0]  exp_send_addr;
  bit          forced_ir;
  logic [15:0] forced_val;
  int steps = 0;

  // mechanism counters
  int n_elev = 0, n_hall = 0, n_both = 0, n_retx = 0, n_blocked = 0;
  int n_btaken = 0, n_bnot = 0, n_jump = 0, n_jal = 0, n_ld = 0, n_st = 0;
  int n_recv = 0, n_send = 0, n_shl = 0, n_shr = 0, n_ei = 0, n_di = 0, n_scan = 0;

  function automatic bit cond(input logic [3:0] cc, input alu_flags_t f);
    case (cc)
      4'd0: return f.z;             4'd1: return !f.z;
      4'd2: return f.c;             4'd3: return !f.c;
      4'd4: return !f.l && !f.z;    4'd5: return f.l || f.z;
      4'd6: return !f.n && !f.z;    4'd7: return f.n || f.z;
      4'd8: return f.f;             4'd9: return !f.f;
      4'd10: return f.l;            4'd11: return !f.l;
      4'd12: return f.n;            4'd13: return !f.n;
      4'd14: return 1'b1;           default: return 1'b0;
    endcase
  endfunction

  function automatic logic [15:0] mem_rd(input logic [15:0] a);
    if (mem.exists(int'(a))) return mem[int'(a)];
    return dut.u_ram.mem[a];
  endfunction

  task automatic add_flags(input logic [15:0] a, input logic [15:0] b, input bit sub,
                           inout psr_t p, output logic [15:0] y);
    int sa, sb, sy;
    sa = $signed(a); sb = $signed(b);
    if (sub) begin y = a - b; p.fl.c = (a < b); sy = sa - sb; end
    else     begin y = a + b; p.fl.c = (17'(a) + 17'(b)) > 17'h0FFFF; sy = sa + sb; end
    p.fl.f = (sy > 32767) || (sy < -32768);
  endtask

  task automatic cmp_flags(input logic [15:0] a, input logic [15:0] b, inout psr_t p);
    p.fl.z = (a == b); p.fl.l = (a < b); p.fl.n = ($signed(a) < $signed(b));
  endtask

  task automatic model_step(input logic [15:0] ins, input logic i0, input logic i1,
                            input logic [7:0] ia, input logic [15:0] edin);
    logic [3:0]  op, ex;
    int          rd, rs;
    logic [15:0] a, b, y, sx, zx, npc, v;
    psr_t        np;
    bit          right;
    int          amt;
    op = ins[15:12]; ex = ins[7:4]; rd = ins[10:8]; rs = ins[2:0];
    a = R[rd]; b = R[rs];
    sx = {{8{ins[7]}}, ins[7:0]}; zx = {8'h00, ins[7:0]};
    npc = m_pc + 1; np = m_psr;
    case (op)
      OP_REG: case (ex)
        EX_AND: R[rd] = a & b;
        EX_OR:  R[rd] = a | b;
        EX_XOR: R[rd] = a ^ b;
        EX_MOV: R[rd] = b;
        EX_ADD: begin add_flags(a, b, 0, np, y); R[rd] = y; end
        EX_SUB: begin add_flags(a, b, 1, np, y); R[rd] = y; end
        EX_CMP: cmp_flags(a, b, np);
        default: ;
      endcase
      OP_ANDI: R[rd] = a & zx;
      OP_ORI:  R[rd] = a | zx;
      OP_XORI: R[rd] = a ^ zx;
      OP_MOVI: R[rd] = zx;
      OP_LUI:  R[rd] = {ins[7:0], 8'h00};
      OP_ADDI: begin add_flags(a, sx, 0, np, y); R[rd] = y; end
      OP_SUBI: begin add_flags(a, sx, 1, np, y); R[rd] = y; end
      OP_CMPI: cmp_flags(a, sx, np);
      OP_SHFT: begin
        if (ex == EX_LSH) begin
          right = b[15]; v = -b; amt = right ? v[3:0] : b[3:0];
        end else begin
          right = ins[4]; amt = ins[3:0];
        end
        R[rd] = right ? (a >> amt) : (a << amt);
        if (right) n_shr++; else n_shl++;
      end
      OP_BCND: if (cond(ins[11:8], m_psr.fl)) begin npc = m_pc + sx; n_btaken++; end
               else n_bnot++;
      OP_SPEC: case (ex)
        EX_LD:   begin R[rd] = mem_rd(b); n_ld++; end
        EX_ST:   begin mem[int'(b)] = a; n_st++; end
        EX_JAL:  begin npc = b; R[rd] = m_pc + 1; n_jal++; end
        EX_JCND: if (cond(ins[11:8], m_psr.fl)) begin npc = b; n_jump++; end
        EX_EI:   begin np.ie = 1'b1; n_ei++; end
        EX_DI:   begin np.ie = 1'b0; n_di++; end
        EX_RETX: begin npc = m_epc; np = m_epsr; n_retx++; end
        EX_SEND: begin
          send_due = 1; exp_send_data = b; exp_send_addr = {a[6:0], 1'b1}; n_send++;
        end
        EX_RECV: begin mem[int'(a + 16'(m_int_addr[7:1]))] = edin; n_recv++; end
        default: ;
      endcase
      default: ;
    endcase
    if (!(m_psr.ie && np.ie) && (i0 || i1)) n_blocked++;
    if (m_psr.ie && np.ie && (i0 || i1)) begin
      m_epc = npc; m_epsr = np; np.ie = 1'b0; m_int_addr = ia;
      if (i0) begin npc = VEC_ELEV; n_elev++; if (i1) n_both++; end
      else begin npc = VEC_HALL_BASE + {7'd0, ia[7:1], 1'b0}; n_hall++; end
    end
    m_psr = np; m_pc = npc;
    steps++;
  endtask

  // Step the model in the middle of every execute cycle and compare.
  int cycles = 0;
  always @(posedge clk) if (rst_n && !scan_en) cycles++;

  always @(negedge clk) begin
    if (rst_n && !scan_en && dut.u_ctrl.state == 1'b1) begin
      logic [15:0] ins;
      check(rom_addr == m_pc, $sformatf("PC %h, model %h", rom_addr, m_pc));
      ins = forced_ir ? forced_val : rom[m_pc];
      check(ir_out == ins, $sformatf("IR %h, expected %h at %h", ir_out, ins, m_pc));
      forced_ir = 0;
      model_step(ins, irq0, irq1, irq_addr, elev_data_in);
      @(posedge clk); #1;
      check(rom_addr == m_pc, $sformatf("next PC %h, model %h", rom_addr, m_pc));
      check(busbusy == !m_psr.ie, "busbusy");
      if (send_due) begin
        check(send_strobe && elev_data_out == exp_send_data && elev_addr_out == exp_send_addr,
              $sformatf("SEND %b %h %h, expected %h %h", send_strobe, elev_addr_out,
                        elev_data_out, exp_send_addr, exp_send_data));
        send_due = 0;
      end else check(!send_strobe, "spurious send_strobe");
      @(negedge clk); #1;
      for (int r = 0; r < 8; r++)
        check(dut.u_dp.u_rf.regs[r] == R[r],
              $sformatf("R%0d %h, model %h (after %h)", r, dut.u_dp.u_rf.regs[r], R[r], ins));
    end
  end

  // ---------------------------------------------------------- devices
  task automatic wait_taken();
    do @(posedge clk); while (!busbusy);
    #1;
  endtask

  task automatic wait_free();
    do @(posedge clk); while (busbusy);
    #1;
  endtask

  initial begin
    logic [31:0] scanned, newbits;
    rst_n = 1'b0; irq0 = 0; irq1 = 0; irq_addr = 0; elev_data_in = 0;
    scan_en = 0; scan_in = 0;
    m_pc = 0; m_psr = '0; m_epsr = '0; m_epc = 0; m_int_addr = 0; send_due = 0; forced_ir = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (R[r]) R[r] = dut.u_dp.u_rf.regs[r];

    // 1. elevator 3 reports status word 0xBEEF
    wait (rom_addr == 16'h18);
    repeat (20) @(posedge clk); #1;
    irq0 = 1; irq_addr = {7'd3, 1'b1}; elev_data_in = 16'hBEEF;
    wait_taken(); irq0 = 0;
    wait_free(); repeat (9) @(posedge clk); #1;
    // 2. hall button 9
    irq1 = 1; irq_addr = {7'd9, 1'b0};
    wait_taken(); irq1 = 0;
    wait_free(); repeat (13) @(posedge clk); #1;
    // 3. elevator 12 and hall button 20 at the same moment
    irq0 = 1; irq1 = 1; irq_addr = {7'd12, 1'b1}; elev_data_in = 16'h1357;
    wait_taken(); irq0 = 0; irq_addr = {7'd20, 1'b0};
    wait_free(); wait_taken(); irq1 = 0;
    // 4. a hall call while interrupts are disabled
    wait (rom_addr == 16'h1C);
    @(posedge clk); #1;
    irq1 = 1; irq_addr = {7'd33, 1'b0};
    repeat (12) @(posedge clk); #1;
    irq1 = 0;
    // run to the halt loop
    wait (rom_addr == HALT);
    repeat (8) @(posedge clk); #1;
    check(rom_addr == HALT, "halted");
    // 5. scan: read PC and IR, force SCAN_PC and MOVI r0,0x5A
    while (dut.u_ctrl.state != 1'b0) begin @(posedge clk); #1; end
    newbits = {MOVI(0, 'h5A), SCAN_PC};
    scan_en = 1;
    for (int i = 0; i < 32; i++) begin
      scanned = {scanned[30:0], scan_out};
      scan_in = (i < 16) ? newbits[31 - i] : newbits[15 - (i - 16)];
      @(posedge clk); #1;
    end
    scan_en = 0;
    check(scanned == {rom[HALT], HALT}, $sformatf("scan out %h", scanned));
    m_pc = SCAN_PC; forced_ir = 1; forced_val = MOVI(0, 'h5A); n_scan++;
    repeat (6) @(posedge clk); #1;
    check(dut.u_dp.u_rf.regs[0] == 16'h005A, "scanned-in instruction executed");
    check(rom_addr == SCAN_PC + 1, "scanned-in address used");

    // RAM contents written by ST and RECV
    foreach (mem[a]) check(dut.u_ram.mem[a] == mem[a], $sformatf("RAM[%h]", a));
    check(mem.exists(16'h80 + 3) && mem[16'h80 + 3] == 16'hBEEF, "RECV elevator 3");
    check(mem.exists(16'h80 + 12) && mem[16'h80 + 12] == 16'h1357, "RECV elevator 12");
    // two cycles per instruction
    check(cycles >= 2 * steps && cycles <= 2 * steps + 8,
          $sformatf("cycles %0d for %0d instructions", cycles, steps));

    $display("mechanisms: elev_int=%0d hall_int=%0d simultaneous=%0d retx=%0d blocked=%0d",
             n_elev, n_hall, n_both, n_retx, n_blocked);
    $display("  branch_taken=%0d branch_not=%0d jump=%0d jal=%0d ld=%0d st=%0d recv=%0d send=%0d",
             n_btaken, n_bnot, n_jump, n_jal, n_ld, n_st, n_recv, n_send);
    $display("  shift_left=%0d shift_right=%0d ei=%0d di=%0d scan=%0d instructions=%0d cycles=%0d",
             n_shl, n_shr, n_ei, n_di, n_scan, steps, cycles);
    check(n_elev >= 2, "elevator interrupts"); check(n_hall >= 2, "hall interrupts");
    check(n_both >= 1, "simultaneous interrupts"); check(n_retx >= 4, "RETX");
    check(n_blocked >= 1, "request held off by busbusy");
    check(n_btaken >= 1 && n_bnot >= 1, "branches"); check(n_jump >= 1, "jumps");
    check(n_jal >= 1, "JAL"); check(n_ld >= 1 && n_st >= 1, "LD/ST");
    check(n_recv >= 2, "RECV"); check(n_send >= 3, "SEND");
    check(n_shl >= 1 && n_shr >= 1, "shifts"); check(n_ei >= 1 && n_di >= 1, "EI/DI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
