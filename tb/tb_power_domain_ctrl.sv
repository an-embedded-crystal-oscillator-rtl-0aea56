// tb_power_domain_ctrl: checks the power-gating and isolation order of one domain with
// ISO_DLY = 4, WAKE_DLY = 16. Waking: pgc_on rises on the edge that sees on_req while
// iso_en stays high; iso_en falls (and active rises) exactly WAKE_DLY edges later. Sleeping:
// iso_en rises first, pgc_on falls exactly ISO_DLY edges later. A cycle-by-cycle monitor
// counts any cycle with power off and isolation released.
module tb_power_domain_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int ISO_DLY = 4, WAKE_DLY = 16;

  logic clk = 1'b0, rst_n = 1'b1, on_req = 1'b0;
  logic pgc_on, iso_en, active;
  int checks = 0, failures = 0;

  power_domain_ctrl #(.ISO_DLY(ISO_DLY), .WAKE_DLY(WAKE_DLY)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) if (rst_n) check(pgc_on || iso_en, "unpowered domain not isolated");

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
    int n;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!pgc_on && iso_en && !active, "asleep after reset");
    for (int rep = 0; rep < 3; rep++) begin
      on_req = 1'b1;
      @(posedge clk); #1;
      check(pgc_on && iso_en, "power first, still isolated");
      n = 0;
      while (iso_en && n < 100) begin
        @(posedge clk); #1;
        n++;
      end
      check(n == WAKE_DLY, $sformatf("isolation released %0d edges after power-on", n));
      check(active && pgc_on, "active");
      repeat (10) @(posedge clk);
      #1 on_req = 1'b0;
      @(posedge clk); #1;
      check(iso_en && pgc_on && !active, "isolate first, still powered");
      n = 0;
      while (pgc_on && n < 100) begin
        @(posedge clk); #1;
        n++;
      end
      check(n == ISO_DLY, $sformatf("power cut %0d edges after isolation", n));
      check(iso_en && !active, "asleep");
      repeat (5) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
