// tb_ddfs: self-checking testbench of the DDFS clock generator at a 100 MHz system clock.
// Checks: ftw_init is taken on the first edge after reset; the phase advances by exactly the
// active word each cycle; a new word is taken 3 edges after its toggle; dac_code equals the
// sine of the phase's top 10 bits one cycle later; and clk_out has the mean frequency
// ftw * f_clk / 2^48 (edge count over a long interval, within one edge).
module tb_ddfs;
  import ecrystal_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b1, ftw_toggle = 1'b0;
  ftw_t ftw_init = 48'd14073748835533;   // 5 MHz
  ftw_t ftw_in = '0, ftw;
  logic [FTW_W-1:0] phase;
  logic signed [11:0] dac_code;
  logic clk_out;
  int checks = 0, failures = 0;

  ddfs dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int rises = 0;
  always @(posedge clk_out) rises++;

  // async reset needs a falling edge, not just a low initial value
  initial #2 rst_n = 1'b0;

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_freq(input int ncyc);
    real expr;
    int r0;
    r0 = rises;
    repeat (ncyc) @(posedge clk);
    expr = real'(ftw) / (2.0 ** 48) * real'(ncyc);
    check((real'(rises - r0) - expr) <= 1.5 && (expr - real'(rises - r0)) <= 1.5,
          $sformatf("clk_out edges %0d expected %f", rises - r0, expr));
  endtask

  initial begin
    logic [FTW_W-1:0] p_prev;
    int  idx, expv;
    real s;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    check(ftw == ftw_init, "initial word loaded on first edge");
    // phase step and sine output
    for (int k = 0; k < 200; k++) begin
      p_prev = phase;
      @(posedge clk);
      #1;
      check(phase == p_prev + ftw, "phase advances by ftw");
      idx  = int'(p_prev[FTW_W-1 -: 10]);
      s    = $sin(2.0 * PI * (real'(idx) + 0.5) / 1024.0);
      expv = $rtoi((s < 0.0 ? -s : s) * 2047.0 + 0.5);
      if (s < 0.0) expv = -expv;
      check(int'(dac_code) == expv, $sformatf("dac_code %0d expected %0d", dac_code, expv));
    end
    check_freq(200000);
    // load a new word through the toggle handshake
    #1 ftw_in = 48'd14076003000000;
    ftw_toggle = !ftw_toggle;
    @(posedge clk); #1;
    check(ftw == ftw_init, "not yet loaded after 1 edge");
    @(posedge clk); #1;
    check(ftw == ftw_init, "not yet loaded after 2 edges");
    @(posedge clk); #1;
    check(ftw == ftw_in, "loaded after 3 edges");
    check_freq(300000);
    // a large word (about 30 MHz)
    #1 ftw_in = 48'd84442493013197;
    ftw_toggle = !ftw_toggle;
    repeat (4) @(posedge clk);
    check(ftw == ftw_in, "second word loaded");
    check_freq(100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
