// tb_cpn_power_manager: checks the central node's power manager. For a random sequence of
// modes, once the sequences have had time to finish, exactly the mode's domain is powered
// and active (none in idle). Every cycle no domain is unpowered without isolation, and a
// domain leaving its mode is isolated before its power is cut.
module tb_cpn_power_manager;
  import ecrystal_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b1;
  cpn_mode_e mode = CPN_IDLE;
  logic [2:0] pgc_on, iso_en, active, prev_pgc = '0, prev_iso = '1;
  int checks = 0, failures = 0;

  cpn_power_manager dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int g = 0; g < 3; g++) begin
      check(pgc_on[g] || iso_en[g], "unpowered and not isolated");
      // power may only drop in a cycle where isolation was already on
      if (prev_pgc[g] && !pgc_on[g]) check(prev_iso[g], "power cut before isolation");
    end
    prev_pgc = pgc_on;
    prev_iso = iso_en;
  end

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
    logic [2:0] want;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      mode = (i < 4) ? cpn_mode_e'(i) : cpn_mode_e'($urandom_range(3));
      repeat (30) @(posedge clk);
      #1;
      want = (mode == CPN_IDLE) ? 3'b000 : 3'(1 << (int'(mode) - 1));
      check(active == want && pgc_on == want, $sformatf("mode %s: active %b", mode.name(), active));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
