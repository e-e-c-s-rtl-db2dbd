// eecs_control: sequencer, instruction decoder, status register and interrupt
// logic of the E.E.C.S. controller.
//
// Each instruction takes two cycles. In FETCH the control word loads the IR
// from the instruction ROM. In EXECUTE the IR is decoded into one control word
// for the datapath; at the rising edge that ends the cycle the PC, RAM and
// status register are updated and the next FETCH begins.
//
// Status register (PSR): an interrupt-enable bit and the flags C, F (set by
// ADD/ADDI/SUB/SUBI) and Z, L, N (set by CMP/CMPI). Bcond and Jcond test the
// flags. EI sets the enable bit, DI clears it, and busbusy, the pin that tells
// elevators and hall buttons that no interrupt will be taken, is its inverse.
//
// Interrupts: at the end of an EXECUTE during which interrupts were enabled
// throughout (enabled before it, and not disabled by it), a request on
// irq0 (elevator status) or irq1 (hall call) is accepted. irq0 has precedence
// and vectors to 0xFFE0, one routine for all elevators; irq1 vectors to
// 0xFE00 + 2 * (irq_addr >> 1), a separate entry for each hall button. The
// address held on irq_addr is kept in the interrupt address register; RECV
// uses its upper seven bits as the serviced elevator's id. On acceptance the
// PC the program would have gone on with and the PSR (as updated by the
// finishing instruction) are saved, and interrupts are disabled, so busbusy
// rises. RETX restores both. Requests are level-sensitive: a device holds its
// request until it sees busbusy rise with its address on the line. Because an
// instruction that enables interrupts (EI, RETX) is never itself interrupted,
// busbusy is low for at least one whole instruction between two services, so
// every acceptance is a rising edge of busbusy.
//
// Scan: while scan_en is high nothing executes; when it falls the control
// unit executes the instruction in the IR at the address in the PC.
//
// Following the design: the two interrupt lines and their vectors, elevator
// precedence, PC/PSR save and RETX, EI/DI and busbusy, SEND/RECV, scan.
// This design's own choices: two-cycle sequencing, the encoding, the flag
// rules, the hall vector spacing, the reset state (PC 0, interrupts disabled).
module eecs_control
  import eecs_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             scan_en,
  input  logic [15:0]      ir,
  input  logic [15:0]      seq_next,
  input  alu_flags_t       flags,
  input  logic             irq0,
  input  logic             irq1,
  input  logic [DEV_W-1:0] irq_addr,
  output ctrl_t            ctrl,
  output psr_t             psr,
  output logic             busbusy
);

  typedef enum logic { S_FETCH, S_EXEC } state_e;

  state_e           state;
  psr_t             psr_next, epsr;
  logic [15:0]      epc;
  logic [DEV_W-1:0] int_addr;
  logic             cond_true;
  logic [3:0]       op, ex;

  assign op = ir[15:12];
  assign ex = ir[7:4];

  function automatic logic cond_holds(input logic [3:0] cc, input alu_flags_t f);
    unique case (cond_e'(cc))
      CC_EQ:   return f.z;
      CC_NE:   return !f.z;
      CC_CS:   return f.c;
      CC_CC:   return !f.c;
      CC_HI:   return !f.l && !f.z;
      CC_LS:   return f.l || f.z;
      CC_GT:   return !f.n && !f.z;
      CC_LE:   return f.n || f.z;
      CC_FS:   return f.f;
      CC_FC:   return !f.f;
      CC_LO:   return f.l;
      CC_HS:   return !f.l;
      CC_LT:   return f.n;
      CC_GE:   return !f.n;
      CC_UC:   return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  assign cond_true = cond_holds(ir[11:8], psr.fl);

  // Decoder: control word and next PSR.
  always_comb begin
    ctrl          = '0;
    ctrl.pc_sel   = PC_HOLD;
    ctrl.alu_op   = ALU_PASSB;
    ctrl.b_sel    = B_REG;
    ctrl.imm_kind = IMM_ZEXT;
    ctrl.res_sel  = RES_ALU;
    ctrl.pc_ret   = epc;
    ctrl.dev_id   = int_addr[DEV_W-1:1];
    psr_next      = psr;

    if (!scan_en && state == S_FETCH) begin
      ctrl.ir_load = 1'b1;
    end else if (!scan_en && state == S_EXEC) begin
      ctrl.pc_sel = PC_INC;
      unique case (op)
        OP_REG: begin
          ctrl.b_sel = B_REG;
          unique case (ex)
            EX_AND: begin ctrl.alu_op = ALU_AND; ctrl.rf_we = 1'b1; end
            EX_OR:  begin ctrl.alu_op = ALU_OR;  ctrl.rf_we = 1'b1; end
            EX_XOR: begin ctrl.alu_op = ALU_XOR; ctrl.rf_we = 1'b1; end
            EX_MOV: begin ctrl.alu_op = ALU_PASSB; ctrl.rf_we = 1'b1; end
            EX_ADD: begin
              ctrl.alu_op = ALU_ADD; ctrl.rf_we = 1'b1;
              psr_next.fl.c = flags.c; psr_next.fl.f = flags.f;
            end
            EX_SUB: begin
              ctrl.alu_op = ALU_SUB; ctrl.rf_we = 1'b1;
              psr_next.fl.c = flags.c; psr_next.fl.f = flags.f;
            end
            EX_CMP: begin
              ctrl.alu_op = ALU_SUB;
              psr_next.fl.z = flags.z; psr_next.fl.l = flags.l; psr_next.fl.n = flags.n;
            end
            default: ;  // NOP
          endcase
        end
        OP_ANDI: begin ctrl.b_sel = B_IMM; ctrl.alu_op = ALU_AND; ctrl.rf_we = 1'b1; end
        OP_ORI:  begin ctrl.b_sel = B_IMM; ctrl.alu_op = ALU_OR;  ctrl.rf_we = 1'b1; end
        OP_XORI: begin ctrl.b_sel = B_IMM; ctrl.alu_op = ALU_XOR; ctrl.rf_we = 1'b1; end
        OP_MOVI: begin ctrl.b_sel = B_IMM; ctrl.alu_op = ALU_PASSB; ctrl.rf_we = 1'b1; end
        OP_LUI: begin
          ctrl.b_sel = B_IMM; ctrl.imm_kind = IMM_LUI; ctrl.alu_op = ALU_PASSB; ctrl.rf_we = 1'b1;
        end
        OP_ADDI, OP_SUBI: begin
          ctrl.b_sel = B_IMM; ctrl.imm_kind = IMM_SEXT; ctrl.rf_we = 1'b1;
          ctrl.alu_op = (op == OP_ADDI) ? ALU_ADD : ALU_SUB;
          psr_next.fl.c = flags.c; psr_next.fl.f = flags.f;
        end
        OP_CMPI: begin
          ctrl.b_sel = B_IMM; ctrl.imm_kind = IMM_SEXT; ctrl.alu_op = ALU_SUB;
          psr_next.fl.z = flags.z; psr_next.fl.l = flags.l; psr_next.fl.n = flags.n;
        end
        OP_SHFT: begin
          if (ex == EX_LSH) begin
            ctrl.res_sel = RES_SHIFT; ctrl.rf_we = 1'b1;
          end else if (ex[3:1] == 3'b000) begin
            ctrl.res_sel = RES_SHIFT; ctrl.shift_imm = 1'b1; ctrl.rf_we = 1'b1;
          end
        end
        OP_BCND: begin
          ctrl.a_pc = 1'b1; ctrl.b_sel = B_IMM; ctrl.imm_kind = IMM_SEXT; ctrl.alu_op = ALU_ADD;
          if (cond_true) ctrl.pc_sel = PC_BRANCH;
        end
        OP_SPEC: begin
          unique case (ex)
            EX_LD:   begin ctrl.res_sel = RES_MEM; ctrl.rf_we = 1'b1; end
            EX_ST:   ctrl.ram_we = 1'b1;
            EX_JAL:  begin ctrl.res_sel = RES_LINK; ctrl.rf_we = 1'b1; ctrl.pc_sel = PC_JUMP; end
            EX_JCND: if (cond_true) ctrl.pc_sel = PC_JUMP;
            EX_EI:   psr_next.ie = 1'b1;
            EX_DI:   psr_next.ie = 1'b0;
            EX_RETX: begin ctrl.pc_sel = PC_FORCE; psr_next = epsr; end
            EX_SEND: ctrl.send = 1'b1;
            EX_RECV: begin
              ctrl.alu_op = ALU_ADD; ctrl.b_sel = B_DEVID;
              ctrl.ram_we = 1'b1; ctrl.ram_from_dev = 1'b1;
            end
            default: ;
          endcase
        end
        default: ;  // unused opcodes execute as NOP
      endcase

      // Interrupt acceptance, elevator requests first.
      ctrl.int_take = psr.ie && psr_next.ie && (irq0 || irq1);
      ctrl.int_vec  = irq0 ? VEC_ELEV
                           : VEC_HALL_BASE + {7'd0, irq_addr[DEV_W-1:1], 1'b0};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_FETCH;
      psr      <= '0;
      epsr     <= '0;
      epc      <= '0;
      int_addr <= '0;
    end else if (scan_en) begin
      state <= S_EXEC;
    end else if (state == S_FETCH) begin
      state <= S_EXEC;
    end else begin
      state <= S_FETCH;
      psr   <= psr_next;
      if (ctrl.int_take) begin
        epc      <= seq_next;
        epsr     <= psr_next;
        psr.ie   <= 1'b0;
        int_addr <= irq_addr;
      end
    end
  end

  assign busbusy = !psr.ie;

  // An accepted interrupt always closes the bus to further requests.
  a_int_busy: assert property (@(posedge clk) disable iff (!rst_n)
                               ctrl.int_take |=> busbusy);
  // A request is only taken at the end of an execute cycle.
  a_int_exec: assert property (@(posedge clk) disable iff (!rst_n)
                               ctrl.int_take |-> state == S_EXEC);

endmodule
