// eecs_top: the E.E.C.S. elevator controller chip.
//
// A 16-bit RISC controller for a building of 16 elevators and 64 floors. It
// learns of elevator status changes and hall-button presses through two
// interrupt lines, stores what elevators report in a large on-chip RAM with a
// single RECV instruction, and tells an elevator where to go with SEND. The
// chip has three parts, all instantiated here: the datapath (PC, IR, register
// file, ALU, shifter), the control unit (sequencer, decoder, status and
// interrupt registers) and the data RAM. The program lives in an external
// instruction ROM, addressed by rom_addr (the PC) and read on rom_data.
//
// Pins: rom_addr/rom_data to the program ROM; ir_out shows the instruction
// register; irq0 (elevator), irq1 (hall call) and irq_addr (address of the
// requesting device) in; busbusy out, high while no interrupt is accepted;
// elev_data_in is the word an elevator transmits for RECV; elev_data_out,
// elev_addr_out and send_strobe carry SEND; scan_en/scan_in/scan_out give
// serial access to PC and IR.
//
// Timing: every instruction takes two clock cycles (fetch, execute). The ROM
// must return rom_data within the fetch cycle in which rom_addr changes. The
// RAM is word-addressed with 19 address bits; the 16-bit registers reach its
// first 64K words (the upper address bits are tied to zero).
module eecs_top
  import eecs_pkg::*;
#(
  parameter int unsigned RAM_WORDS = RAM_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [15:0]      rom_addr,
  input  logic [15:0]      rom_data,
  output logic [15:0]      ir_out,
  input  logic             irq0,
  input  logic             irq1,
  input  logic [DEV_W-1:0] irq_addr,
  output logic             busbusy,
  input  logic [15:0]      elev_data_in,
  output logic [15:0]      elev_data_out,
  output logic [DEV_W-1:0] elev_addr_out,
  output logic             send_strobe,
  input  logic             scan_en,
  input  logic             scan_in,
  output logic             scan_out
);

  localparam int unsigned AW = $clog2(RAM_WORDS);

  ctrl_t       ctrl;
  alu_flags_t  flags;
  logic [15:0] seq_next;
  logic        ram_we;
  logic [15:0] ram_addr, ram_wdata, ram_rdata;
  logic [AW-1:0] ram_addr_full;

  eecs_control u_ctrl (
    .clk, .rst_n, .scan_en, .ir(ir_out), .seq_next, .flags,
    .irq0, .irq1, .irq_addr, .ctrl, .psr(), .busbusy
  );

  eecs_datapath u_dp (
    .clk, .rst_n, .ctrl, .scan_en, .scan_in, .scan_out,
    .rom_data, .pc(rom_addr), .ir(ir_out), .seq_next, .flags,
    .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
    .elev_data_in, .elev_data_out, .elev_addr_out, .send_strobe
  );

  if (AW > 16) begin : g_wide
    assign ram_addr_full = {{(AW-16){1'b0}}, ram_addr};
  end else begin : g_narrow
    assign ram_addr_full = ram_addr[AW-1:0];
  end

  eecs_ram #(.DEPTH(RAM_WORDS)) u_ram (
    .clk, .we(ram_we), .addr(ram_addr_full), .wdata(ram_wdata), .rdata(ram_rdata)
  );

endmodule
