// tb_cal_controller: self-checking testbench of the calibration controller.
// The clock generator and the detector are replaced by an exact arithmetic plant: the
// generated frequency is f = ftw * 100 MHz / 2^48 and a detection returns
// N_err = round(N_CLK * N_SYN * |eps| / (1 + eps)) a fixed 50 cycles after det_start.
// Checked: the first step equals N_err * GAIN upwards (the guessed direction); the
// direction reverses after a wrong guess and only then; the loop locks with |eps| <= 50 ppm
// within MAX_ITER; recal_req restarts from the current word; a plant that never improves
// ends in CAL_FAIL after MAX_ITER steps.
module tb_cal_controller;
  import ecrystal_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N_SYN = 280;
  localparam int unsigned N_CLK = 16384;
  localparam int unsigned CNT_W = 20;
  localparam int unsigned MAX_ITER = 16;
  localparam ftw_t        FTW_NOM = 48'd14073748835533;
  localparam real         F_SYS = 100.0e6;
  localparam real         F_O   = 5.0e6;

  logic             clk = 1'b0, rst_n = 1'b1, recal_req = 1'b0;
  ftw_t             ftw_init = FTW_NOM;
  logic             det_start, det_done = 1'b0;
  logic [CNT_W-1:0] det_n_err = '0;
  ftw_t             ftw;
  logic             ftw_toggle, locked, cal_fail, step_pulse, reverse_pulse;
  cal_state_e       state;
  int               checks = 0, failures = 0;
  int               steps = 0, reversals = 0;
  bit               stuck_plant = 1'b0;
  real              f_target = F_O;

  cal_controller #(.N_SYN(N_SYN), .N_CLK(N_CLK), .CNT_W(CNT_W), .MAX_ITER(MAX_ITER)) dut (.*);

  always #100 clk = !clk;

  function automatic real eps_of(ftw_t w);
    return (real'(w) * F_SYS / (2.0 ** 48)) / f_target - 1.0;
  endfunction

  // behavioural detector
  // async reset needs a falling edge, not just a low initial value
  initial #2 rst_n = 1'b0;

  initial begin
    real e, n;
    forever begin
      @(posedge clk);
      if (det_start) begin
        e = eps_of(ftw);
        n = real'(N_CLK) * real'(N_SYN) * (e < 0.0 ? -e : e) / (1.0 + e);
        repeat (50) @(posedge clk);
        det_n_err <= stuck_plant ? CNT_W'(5000) : CNT_W'($rtoi(n + 0.5));
        det_done  <= 1'b1;
        @(posedge clk);
        det_done  <= 1'b0;
      end
    end
  end

  always @(posedge clk) begin
    if (step_pulse) steps++;
    if (reverse_pulse) reversals++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wait_end();
    int guard = 0;
    while (!(locked || cal_fail) && guard < 2000000) begin
      @(posedge clk);
      guard++;
    end
  endtask

  task automatic run_case(input real off_ppm, input int expect_reverse);  // 2: either
    ftw_t w0, w1;
    longint unsigned gain, n0;
    real e;
    ftw_init = ftw_t'(longint'(real'(FTW_NOM) * (1.0 + off_ppm * 1.0e-6)));
    steps = 0;
    reversals = 0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // first detection and first step
    @(posedge det_done);
    n0 = longint'(det_n_err);
    @(posedge clk);
    w0 = ftw;
    check(w0 == ftw_init, "tuning word starts at ftw_init");
    if (off_ppm > 50.0 || off_ppm < -50.0) begin
      @(posedge step_pulse);
      w1 = ftw;
      gain = (longint'(FTW_NOM) + longint'(N_SYN * N_CLK) / 2) / longint'(N_SYN * N_CLK);
      check(longint'(w1) - longint'(w0) == longint'(n0 * gain),
            $sformatf("first step %0d = N_err(%0d) * GAIN(%0d) upwards", longint'(w1) - longint'(w0), n0, gain));
    end
    wait_end();
    e = eps_of(ftw);
    check(locked, $sformatf("locked for %f ppm", off_ppm));
    check(e < 50.0e-6 && e > -50.0e-6, $sformatf("residual %f ppm for %f ppm", e * 1.0e6, off_ppm));
    check(steps <= int'(MAX_ITER), "iterations within budget");
    if (expect_reverse != 2) check((reversals > 0) == (expect_reverse == 1),
          $sformatf("reversals=%0d for %f ppm", reversals, off_ppm));
    $display("offset %f ppm: %0d steps, %0d reversals, residual %f ppm", off_ppm, steps, reversals, e * 1.0e6);
  endtask

  initial begin
    #(200.0 * 3000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e;
    // too fast: the upward guess is wrong and must be reversed
    run_case(1500.0, 1);
    run_case(30000.0, 1);
    run_case(10000.0, 1);
    // too slow: the upward guess is right
    run_case(-1500.0, 0);
    run_case(-30000.0, 2);   // may overshoot by about eps^2 and then reverse
    // already within target: lock without a step
    run_case(-20.0, 0);
    check(steps == 0, "no step when already within target");
    // drift while locked, then recalibration from the current word
    f_target = F_O * (1.0 - 800.0e-6);
    @(posedge clk);
    check(locked, "stays locked until asked");
    recal_req = 1'b1;
    @(posedge clk);
    recal_req = 1'b0;
    @(posedge clk);
    check(!locked, "recal_req leaves lock");
    wait_end();
    e = eps_of(ftw);
    check(locked && e < 50.0e-6 && e > -50.0e-6, $sformatf("re-locked after drift, residual %f ppm", e * 1.0e6));
    f_target = F_O;
    // a plant that never improves must end in CAL_FAIL
    stuck_plant = 1'b1;
    ftw_init = FTW_NOM;
    steps = 0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait_end();
    check(cal_fail && !locked, "CAL_FAIL without convergence");
    check(steps == int'(MAX_ITER), $sformatf("%0d steps before fail", steps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
