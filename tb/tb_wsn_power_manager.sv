// tb_wsn_power_manager: checks the sensor node's power manager (ISO_DLY = 4, WAKE_DLY = 16).
// Every cycle: at most one domain powered, no domain powered outside its mode, and no
// domain unpowered without isolation. Scenarios: idle (all asleep); MT-CDMA TX mode with the
// transmitter asleep while the FIFO is not full, woken by fifo_full, back to sleep when the
// FIFO is empty; OFDM DL-RX mode powered for the whole mode; OFDM UL-TX like MT-CDMA TX; a
// mode switch that puts the old domain to sleep before the new one runs.
module tb_wsn_power_manager;
  import ecrystal_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b1, fifo_full = 1'b0, fifo_empty = 1'b1;
  wsn_mode_e mode = WSN_IDLE;
  logic [2:0] pgc_on, iso_en, active;
  int checks = 0, failures = 0;

  wsn_power_manager dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int mode_pgd(wsn_mode_e m);
    case (m)
      WSN_MTCDMA_TX: return PGD_MTCDMA_TX;
      WSN_OFDM_DLRX: return PGD_OFDM_DLRX;
      WSN_OFDM_ULTX: return PGD_OFDM_ULTX;
      default:       return -1;
    endcase
  endfunction

  // The old domain may still be isolating for ISO_DLY cycles after a mode change.
  int since_change = 100;
  wsn_mode_e last_mode = WSN_IDLE;
  always @(negedge clk) if (rst_n) begin
    if (mode != last_mode) since_change = 0; else since_change++;
    last_mode = mode;
    for (int g = 0; g < 3; g++) begin
      check(pgc_on[g] || iso_en[g], $sformatf("domain %0d unpowered and not isolated", g));
      if (since_change > 6 && g != mode_pgd(mode))
        check(!pgc_on[g], $sformatf("domain %0d powered outside its mode %s", g, mode.name()));
    end
  end

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic tx_mode_test(input wsn_mode_e m, input int g);
    mode = m;
    fifo_full = 1'b0;
    fifo_empty = 1'b0;
    wait_cycles(50);
    check(!pgc_on[g] && iso_en[g], $sformatf("%s: transmitter asleep while FIFO fills", m.name()));
    fifo_full = 1'b1;
    wait_cycles(1);
    fifo_full = 1'b0;                 // reading has begun
    wait_cycles(2);
    check(pgc_on[g] && iso_en[g], "woken: powered, still isolated");
    wait_cycles(20);
    check(active[g] && !iso_en[g], "transmitter active after FIFO full");
    wait_cycles(30);
    check(active[g], "stays active while FIFO holds data");
    fifo_empty = 1'b1;
    wait_cycles(2);
    check(iso_en[g] && pgc_on[g], "isolated first after the FIFO emptied");
    wait_cycles(6);
    check(!pgc_on[g], "transmitter asleep again");
  endtask

  // async reset needs a falling edge, not just a low initial value
  initial #2 rst_n = 1'b0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait_cycles(2);
    rst_n = 1'b1;
    wait_cycles(20);
    check(pgc_on == 3'b000 && iso_en == 3'b111, "idle: all asleep");
    tx_mode_test(WSN_MTCDMA_TX, PGD_MTCDMA_TX);
    mode = WSN_OFDM_DLRX;
    wait_cycles(30);
    check(active == 3'b010, "DL-RX mode: only the receiver active");
    fifo_full = 1'b1;
    wait_cycles(30);
    check(active == 3'b010, "DL-RX mode ignores the FIFO");
    fifo_full = 1'b0;
    tx_mode_test(WSN_OFDM_ULTX, PGD_OFDM_ULTX);
    // switch modes while a transmitter is active
    fifo_empty = 1'b0;
    fifo_full = 1'b1;
    wait_cycles(30);
    check(active == 3'b100, "UL-TX active");
    fifo_full = 1'b0;
    mode = WSN_OFDM_DLRX;
    wait_cycles(2);
    check(iso_en[PGD_OFDM_ULTX], "old domain isolated on mode change");
    wait_cycles(30);
    check(active == 3'b010 && pgc_on == 3'b010, "new mode's domain alone");
    mode = WSN_IDLE;
    wait_cycles(10);
    check(pgc_on == 3'b000, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
