// eecs_pkg: types and constants shared by the E.E.C.S. elevator controller.
//
// The controller is a 16-bit RISC processor with eight registers, a fetch/
// execute sequencer, two interrupt lines (elevator status and hall calls) and
// two I/O instructions, SEND and RECV. This package holds the instruction
// encoding, the ALU operation codes, the processor status register layout and
// the control word the control unit hands to the datapath.
//
// Following the design: 16-bit words, 8 registers, 512K-word RAM, elevator ISR
// at 0xFFE0 and hall-call vectors based at 0xFE00, the instruction groups of
// the standard RISC set plus EI, DI, RETX, SEND and RECV.
// This design's own choices: the bit encoding of every instruction (a CR16-like
// 4-bit opcode / 4-bit register / 4-bit extension / 4-bit register layout,
// of which only the low three bits of a register field are used), the flag
// set, the condition codes and the device address format.
package eecs_pkg;

  localparam int unsigned DATA_W    = 16;
  localparam int unsigned NREGS     = 8;
  localparam int unsigned DEV_W     = 8;        // width of the device address line
  localparam int unsigned RAM_DEPTH = 524288;   // 512K words

  localparam logic [15:0] VEC_ELEV      = 16'hFFE0;  // IRQ0: one ISR for all elevators
  localparam logic [15:0] VEC_HALL_BASE = 16'hFE00;  // IRQ1: one vector per hall button

  // Primary opcode, instruction bits [15:12].
  localparam logic [3:0] OP_REG  = 4'b0000;  // register-register ALU group
  localparam logic [3:0] OP_ANDI = 4'b0001;
  localparam logic [3:0] OP_ORI  = 4'b0010;
  localparam logic [3:0] OP_XORI = 4'b0011;
  localparam logic [3:0] OP_SPEC = 4'b0100;  // LD, ST, JAL, Jcond, EI, DI, RETX, SEND, RECV
  localparam logic [3:0] OP_ADDI = 4'b0101;
  localparam logic [3:0] OP_SHFT = 4'b1000;  // LSH, LSHI
  localparam logic [3:0] OP_SUBI = 4'b1001;
  localparam logic [3:0] OP_CMPI = 4'b1011;
  localparam logic [3:0] OP_BCND = 4'b1100;
  localparam logic [3:0] OP_MOVI = 4'b1101;
  localparam logic [3:0] OP_LUI  = 4'b1111;

  // Extension field, bits [7:4], of OP_REG.
  localparam logic [3:0] EX_AND = 4'b0001;
  localparam logic [3:0] EX_OR  = 4'b0010;
  localparam logic [3:0] EX_XOR = 4'b0011;
  localparam logic [3:0] EX_ADD = 4'b0101;
  localparam logic [3:0] EX_SUB = 4'b1001;
  localparam logic [3:0] EX_CMP = 4'b1011;
  localparam logic [3:0] EX_MOV = 4'b1101;

  // Extension field of OP_SHFT: 0100 = LSH by register, 000s = LSHI (s=1: right).
  localparam logic [3:0] EX_LSH = 4'b0100;

  // Extension field of OP_SPEC.
  localparam logic [3:0] EX_LD   = 4'b0000;  // 0100 Rdst  0000 Raddr
  localparam logic [3:0] EX_EI   = 4'b0001;
  localparam logic [3:0] EX_SEND = 4'b0010;  // 0100 Raddr 0010 Rdata
  localparam logic [3:0] EX_DI   = 4'b0011;
  localparam logic [3:0] EX_ST   = 4'b0100;  // 0100 Rsrc  0100 Raddr
  localparam logic [3:0] EX_RECV = 4'b0110;  // 0100 Rbase 0110 xxxx
  localparam logic [3:0] EX_JAL  = 4'b1000;  // 0100 Rlink 1000 Rtgt
  localparam logic [3:0] EX_RETX = 4'b1001;
  localparam logic [3:0] EX_JCND = 4'b1100;  // 0100 cond  1100 Rtgt

  // Condition codes of Bcond / Jcond, bits [11:8].
  typedef enum logic [3:0] {
    CC_EQ = 4'b0000, CC_NE = 4'b0001, CC_CS = 4'b0010, CC_CC = 4'b0011,
    CC_HI = 4'b0100, CC_LS = 4'b0101, CC_GT = 4'b0110, CC_LE = 4'b0111,
    CC_FS = 4'b1000, CC_FC = 4'b1001, CC_LO = 4'b1010, CC_HS = 4'b1011,
    CC_LT = 4'b1100, CC_GE = 4'b1101, CC_UC = 4'b1110, CC_NV = 4'b1111
  } cond_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB
  } alu_op_e;

  // Flags produced by the ALU: carry/borrow, signed overflow, zero,
  // unsigned less-than and signed less-than (the last three from CMP).
  typedef struct packed {
    logic c;
    logic f;
    logic z;
    logic l;
    logic n;
  } alu_flags_t;

  // Processor status register: interrupt enable plus the flags.
  typedef struct packed {
    logic       ie;
    alu_flags_t fl;
  } psr_t;

  typedef enum logic [1:0] { B_REG, B_IMM, B_DEVID } bsel_e;
  typedef enum logic [1:0] { IMM_SEXT, IMM_ZEXT, IMM_LUI } imm_e;
  typedef enum logic [1:0] { RES_ALU, RES_SHIFT, RES_LINK, RES_MEM } res_e;
  typedef enum logic [2:0] { PC_HOLD, PC_INC, PC_BRANCH, PC_JUMP, PC_FORCE } pcsel_e;

  // Control word, valid for one cycle, from the control unit to the datapath.
  typedef struct packed {
    logic                ir_load;    // load IR from the ROM data pins
    pcsel_e              pc_sel;     // how the PC is updated at this clock edge
    logic [15:0]         pc_ret;     // saved PC, loaded for PC_FORCE (RETX)
    logic                int_take;   // interrupt accepted: load int_vec instead
    logic [15:0]         int_vec;    // interrupt service routine address
    logic                a_pc;       // ALU operand A is the PC (branch target)
    alu_op_e             alu_op;
    bsel_e               b_sel;      // ALU operand B: register, immediate, device id
    imm_e                imm_kind;   // how the 8-bit immediate is extended
    logic                shift_imm;  // shift amount from the instruction, not a register
    res_e                res_sel;    // write-back source
    logic                rf_we;      // write Rdst (on the next falling edge)
    logic                ram_we;     // write RAM at this clock edge
    logic                ram_from_dev; // RAM write data from elev_data_in (RECV)
    logic                send;       // drive the elevator pins (SEND)
    logic [DEV_W-2:0]    dev_id;     // id of the device being serviced (RECV offset)
  } ctrl_t;

endpackage
