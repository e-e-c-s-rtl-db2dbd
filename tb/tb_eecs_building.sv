// tb_eecs_building: the controller serving a 64-floor building with 16
// elevators, at full size.
//
// Device models share the interrupt line: every elevator reports several
// status words, and every hall button of 64 floors is pressed once (up on
// floors 0-62, down on floors 1-63: 126 buttons, device numbers 0-125 with
// down = 64 + floor). Requests arrive at random times and overlap; at each
// moment the line carries a pending elevator's address if there is one,
// otherwise a pending hall button's, and a device counts as served when
// busbusy rises while its address is on the line. An accepted elevator keeps
// its status word on elev_data_in until the next elevator is accepted.
//
// The program: the elevator routine is RECV into a status table at 0x0100 and
// RETX; each hall vector loads its button number and jumps to a common
// handler that marks the button in a call table at 0x0200 and SENDs the
// button number to the next elevator in round-robin order.
//
// Checked: every status word arrives in the table slot of its elevator (the
// last one reported is left), every button is marked, every hall call
// produces exactly one SEND with the right elevator address and button number
// in the order the calls were accepted, and no request is lost.
module tb_eecs_building;
  import eecs_pkg::*;
  import eecs_asm_pkg::*;

  localparam int ELEVATORS = 16;
  localparam int FLOORS    = 64;
  localparam int BUTTONS   = 2 * FLOORS - 2;
  localparam int REPORTS   = 4;              // status words per elevator

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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- program
  logic [15:0] rom [65536];
  assign rom_data = rom[rom_addr];

  function automatic int hall_dev(input int floor, input bit down);
    return down ? 64 + floor - 1 : floor;
  endfunction

  initial begin
    foreach (rom[i]) rom[i] = NOP();
    rom[0] = LUI (7, 8'h01);       // status table 0x0100
    rom[1] = LUI (4, 8'hFF);       // hall handler 0xFF00
    rom[2] = MOVI(3, 0);           // next elevator to dispatch
    rom[3] = EI();
    rom[4] = BCND(CC_UC, 0);       // idle
    rom[VEC_ELEV+0] = RECV(7);
    rom[VEC_ELEV+1] = RETX();
    for (int k = 0; k < 128; k++) begin
      rom[VEC_HALL_BASE + 16'(2*k)]     = MOVI(5, k);
      rom[VEC_HALL_BASE + 16'(2*k + 1)] = JCND(CC_UC, 4);
    end
    rom[16'hFF00] = LUI (1, 8'h02);   // call table 0x0200
    rom[16'hFF01] = ADD (1, 5);
    rom[16'hFF02] = MOVI(2, 1);
    rom[16'hFF03] = ST  (2, 1);
    rom[16'hFF04] = SEND(3, 5);
    rom[16'hFF05] = ADDI(3, 1);
    rom[16'hFF06] = ANDI(3, 'h0F);
    rom[16'hFF07] = RETX();
  end

  // ---------------------------------------------------------- devices
  // pending requests: time they become due, and payload
  int          elev_due [ELEVATORS];
  int          elev_left[ELEVATORS];
  logic [15:0] elev_word[ELEVATORS];
  logic [15:0] last_word[ELEVATORS];
  int          hall_due [128];
  bit          hall_used[128];
  int          served_hall[$];
  int          now = 0;
  int          n_elev = 0, n_hall = 0, n_both = 0, n_held = 0, n_sends = 0;
  int          on_line;  // device on the line: 0..15 elevator, 100+k hall, -1 none

  always @(posedge clk) now++;

  function automatic int pick_line();
    for (int e = 0; e < ELEVATORS; e++)
      if (elev_left[e] > 0 && elev_due[e] <= now) return e;
    for (int k = 0; k < 128; k++)
      if (hall_used[k] && hall_due[k] >= 0 && hall_due[k] <= now) return 100 + k;
    return -1;
  endfunction

  function automatic bit any_hall();
    for (int k = 0; k < 128; k++)
      if (hall_used[k] && hall_due[k] >= 0 && hall_due[k] <= now) return 1;
    return 0;
  endfunction

  // SEND monitor: the n-th hall call accepted goes to elevator n mod 16.
  always @(posedge clk) begin
    #1;
    if (rst_n && send_strobe) begin
      check(n_sends < served_hall.size(), "SEND without a hall call");
      if (n_sends < served_hall.size()) begin
        check(elev_addr_out == {7'(n_sends % ELEVATORS), 1'b1} &&
              elev_data_out == 16'(served_hall[n_sends]),
              $sformatf("SEND %0d: addr %h data %h", n_sends, elev_addr_out, elev_data_out));
      end
      n_sends++;
    end
  end

  initial begin
    logic prev_busy;
    int   remaining;
    rst_n = 1'b0; irq0 = 0; irq1 = 0; irq_addr = 0; elev_data_in = 0;
    scan_en = 0; scan_in = 0;
    for (int e = 0; e < ELEVATORS; e++) begin
      elev_left[e] = REPORTS; elev_due[e] = $urandom_range(20, 3000);
      elev_word[e] = {4'(e), 12'($urandom)};
    end
    foreach (hall_due[k]) begin hall_due[k] = -1; hall_used[k] = 0; end
    for (int f = 0; f < FLOORS; f++) begin
      if (f < FLOORS - 1) begin hall_used[hall_dev(f, 0)] = 1; hall_due[hall_dev(f, 0)] = $urandom_range(20, 6000); end
      if (f > 0)          begin hall_used[hall_dev(f, 1)] = 1; hall_due[hall_dev(f, 1)] = $urandom_range(20, 6000); end
    end
    // one elevator and one hall button at exactly the same moment
    elev_due[7] = 400; hall_due[hall_dev(10, 0)] = 400;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    prev_busy = busbusy;
    remaining = ELEVATORS * REPORTS + BUTTONS;
    on_line = -1;
    while (remaining > 0) begin
      @(posedge clk); #1;
      // acceptance: busbusy rose while on_line was driven
      if (busbusy && !prev_busy && on_line >= 0) begin
        if (on_line < 100) begin
          int e;
          e = on_line;
          if (irq1) n_both++;
          elev_data_in = elev_word[e]; last_word[e] = elev_word[e];
          elev_left[e]--; n_elev++;
          elev_word[e] = {4'(e), 12'($urandom)};
          elev_due[e] = now + $urandom_range(100, 1500);
        end else begin
          served_hall.push_back(on_line - 100);
          hall_due[on_line - 100] = -1; n_hall++;
        end
        remaining--;
      end
      prev_busy = busbusy;
      on_line = pick_line();
      if (on_line >= 0 && busbusy) n_held++;
      irq0 = (on_line >= 0 && on_line < 100);
      irq1 = any_hall();
      irq_addr = (on_line < 0) ? 8'h00 : (on_line < 100) ? {7'(on_line), 1'b1} : {7'(on_line - 100), 1'b0};
    end
    irq0 = 0; irq1 = 0;
    repeat (60) @(posedge clk); #1;

    for (int e = 0; e < ELEVATORS; e++)
      check(dut.u_ram.mem[16'h0100 + e] == last_word[e],
            $sformatf("status of elevator %0d: %h, expected %h", e, dut.u_ram.mem[16'h0100 + e], last_word[e]));
    for (int k = 0; k < 128; k++)
      if (hall_used[k]) check(dut.u_ram.mem[16'h0200 + k] == 16'd1, $sformatf("hall button %0d marked", k));
    check(n_sends == BUTTONS, $sformatf("%0d SENDs for %0d buttons", n_sends, BUTTONS));
    check(served_hall.size() == BUTTONS, "every hall call served");
    $display("served: elevator reports=%0d hall calls=%0d simultaneous=%0d cycles requests waited on busbusy=%0d sends=%0d cycles=%0d",
             n_elev, n_hall, n_both, n_held, n_sends, now);
    check(n_elev == ELEVATORS * REPORTS, "all elevator reports served");
    check(n_both >= 1, "an elevator and a hall call competed");
    check(n_held >= 1, "requests waited while busbusy was high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
