// eecs_datapath: program counter, instruction register, register file, ALU and
// shifter of the E.E.C.S. controller, with the muxes that join them.
//
// The control unit runs every instruction in two cycles, fetch and execute,
// and drives this block with one control word (ctrl_t) per cycle.
//  - Fetch: the IR takes the instruction word from the external ROM, whose
//    address is the PC.
//  - Execute: operand A is register Rdst (bits 10:8) or, for a branch, the PC
//    of the branch itself; operand B is register Rsrc (bits 2:0), the 8-bit
//    immediate extended as the control unit asks, or the id of the device
//    being serviced. The ALU computes arithmetic and logic results, branch
//    targets and RAM addresses; the shifter computes LSH/LSHI. At the rising
//    edge that ends the cycle the PC takes its next value (PC+1, branch target,
//    register target, saved PC, or an interrupt vector), RAM writes happen and
//    the result is put in a write-back register.
//  - The register file is written on the falling edge of the following cycle,
//    from the write-back register or, for LD, from the RAM's registered read
//    data.
// SEND copies Rsrc to elev_data_out and {Rdst[6:0], 1} to elev_addr_out with a
// one-cycle send_strobe; the outputs hold until the next SEND. RECV writes
// elev_data_in to RAM at Rdst plus the serviced device's id.
//
// PC and IR form the scan chain scan_in -> PC -> IR -> scan_out while scan_en
// is high. seq_next is the PC the sequencer would load without an interrupt;
// the control unit saves it when it accepts one.
// Following the design: the units, the scan on PC and IR, the negative-edge
// register file, the ALU computing branch addresses from the current PC, the
// SEND address formed by appending a 1 to a register. This design's own
// choices: the two-cycle sequencing, the write-back register, the operand
// fields, the RECV address rule and the shift-amount encoding of LSH (a
// signed register value, negative shifting right).
module eecs_datapath
  import eecs_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  ctrl_t            ctrl,
  // scan
  input  logic             scan_en,
  input  logic             scan_in,
  output logic             scan_out,
  // instruction ROM
  input  logic [15:0]      rom_data,
  output logic [15:0]      pc,
  output logic [15:0]      ir,
  output logic [15:0]      seq_next,
  output alu_flags_t       flags,
  // data RAM
  output logic             ram_we,
  output logic [15:0]      ram_addr,
  output logic [15:0]      ram_wdata,
  input  logic [15:0]      ram_rdata,
  // elevator communication
  input  logic [15:0]      elev_data_in,
  output logic [15:0]      elev_data_out,
  output logic [DEV_W-1:0] elev_addr_out,
  output logic             send_strobe
);

  localparam int unsigned RW = $clog2(NREGS);

  logic          pc_scan_out;
  logic [15:0]   pc_d;
  logic [RW-1:0] rd, rs;
  logic [15:0]   qa, qb, a, b, imm, alu_y, shift_y;
  logic [3:0]    shamt;
  logic          shright;
  logic [3:0]    amt_neg;

  // Write-back register, consumed by the register file at the falling edge.
  logic          wb_we, wb_from_mem;
  logic [RW-1:0] wb_addr;
  logic [15:0]   wb_data;

  eecs_pc u_pc (
    .clk, .rst_n, .load(ctrl.pc_sel != PC_HOLD || ctrl.int_take), .d(pc_d), .q(pc),
    .scan_en, .scan_in, .scan_out(pc_scan_out)
  );

  eecs_ir u_ir (
    .clk, .rst_n, .load(ctrl.ir_load), .d(rom_data), .q(ir),
    .scan_en, .scan_in(pc_scan_out), .scan_out
  );

  assign rd = ir[8 +: RW];
  assign rs = ir[0 +: RW];

  eecs_regfile u_rf (
    .clk, .ra(rd), .rb(rs), .qa, .qb,
    .we(wb_we), .wa(wb_addr), .wd(wb_from_mem ? ram_rdata : wb_data)
  );

  always_comb begin
    unique case (ctrl.imm_kind)
      IMM_SEXT: imm = {{8{ir[7]}}, ir[7:0]};
      IMM_LUI:  imm = {ir[7:0], 8'h00};
      default:  imm = {8'h00, ir[7:0]};
    endcase
  end

  assign a = ctrl.a_pc ? pc : qa;

  always_comb begin
    unique case (ctrl.b_sel)
      B_IMM:   b = imm;
      B_DEVID: b = 16'(ctrl.dev_id);
      default: b = qb;
    endcase
  end

  eecs_alu u_alu (.a, .b, .op(ctrl.alu_op), .y(alu_y), .flags);

  // LSHI: bit 4 selects right, bits 3:0 the distance. LSH: the register holds
  // a signed distance, negative meaning right.
  assign amt_neg = -qb[3:0];
  always_comb begin
    if (ctrl.shift_imm) begin
      shright = ir[4];
      shamt   = ir[3:0];
    end else begin
      shright = qb[15];
      shamt   = qb[15] ? amt_neg : qb[3:0];
    end
  end

  eecs_shifter u_sh (.din(qa), .amt(shamt), .right(shright), .dout(shift_y));

  // Next PC.
  always_comb begin
    unique case (ctrl.pc_sel)
      PC_BRANCH: seq_next = alu_y;
      PC_JUMP:   seq_next = qb;
      PC_FORCE:  seq_next = ctrl.pc_ret;
      PC_HOLD:   seq_next = pc;
      default:   seq_next = pc + 16'd1;
    endcase
  end
  assign pc_d = ctrl.int_take ? ctrl.int_vec : seq_next;

  // Write-back register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_we       <= 1'b0;
      wb_from_mem <= 1'b0;
      wb_addr     <= '0;
      wb_data     <= '0;
    end else begin
      wb_we       <= ctrl.rf_we;
      wb_from_mem <= (ctrl.res_sel == RES_MEM);
      wb_addr     <= rd;
      unique case (ctrl.res_sel)
        RES_SHIFT: wb_data <= shift_y;
        RES_LINK:  wb_data <= pc + 16'd1;
        default:   wb_data <= alu_y;
      endcase
    end
  end

  // RAM port.
  assign ram_we    = ctrl.ram_we;
  assign ram_addr  = alu_y;
  assign ram_wdata = ctrl.ram_from_dev ? elev_data_in : qa;

  // SEND outputs.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      elev_data_out <= '0;
      elev_addr_out <= '0;
      send_strobe   <= 1'b0;
    end else begin
      send_strobe <= ctrl.send;
      if (ctrl.send) begin
        elev_data_out <= qb;
        elev_addr_out <= {qa[DEV_W-2:0], 1'b1};
      end
    end
  end

endmodule
