// tb_jitter_workload: the WBAN calibration loop (5 MHz clock, N_SYN = 280, every parameter
// of the top at its default) with a noisy remote reference. The error signal's half periods
// are each stretched or shrunk at random by up to 0.1 % (rf_error_model JITTER_PPM = 1000), so
// edges arrive early or late against the generated clock and the count in one window varies.
// The loop must still lock with |eps| <= 80 ppm, the accuracy reached with a jittery
// reference, and in fewer than 100 000 generated-clock cycles (20 ms at 5 MHz). Three starts:
// +1500 ppm, -3 % and +3 %. Random jitter values come from $urandom, so the run is repeatable
// for a given seed.
module tb_jitter_workload;
  import ecrystal_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real  F_SYS   = 100.0e6;
  localparam real  F_O     = 5.0e6;
  localparam ftw_t FTW_NOM = 48'd14073748835533;   // 5 MHz / 100 MHz * 2^48

  logic ref_clk = 1'b0, rst_n = 1'b1, err_sig, gen_clk;
  ftw_t ftw_init, ftw_active;
  logic locked, cal_fail, cal_step, cal_reverse, det_done;
  cal_state_e cal_state;
  logic [19:0] det_n_err;
  logic [2:0] pgc_on, iso_en, pgd_active, cpn_pgc_on, cpn_iso_en, cpn_active;
  logic [2:0][7:0] pgd_out;
  logic [7:0] fifo_rd_data;
  logic fifo_full, fifo_empty;
  logic [9:0] fifo_count;
  logic signed [11:0] dac_code;
  int checks = 0, failures = 0, n_detect = 0;

  wsn_ecrystal_top dut (
    .ref_clk, .rst_n, .err_sig, .ftw_init, .recal_req(1'b0), .gen_clk, .dac_code, .ftw_active,
    .locked, .cal_fail, .cal_state, .cal_step, .cal_reverse, .det_done, .det_n_err,
    .mode(WSN_IDLE), .sample_valid(1'b0), .sample_data(8'h00), .fifo_rd_data, .fifo_full,
    .fifo_empty, .fifo_count, .pgd_out_raw('1), .pgd_out, .pgc_on, .iso_en, .pgd_active,
    .cpn_clk(ref_clk), .cpn_rst_n(rst_n), .cpn_mode(CPN_IDLE), .cpn_pgc_on, .cpn_iso_en,
    .cpn_active);

  rf_error_model #(.F_SYS_HZ(F_SYS), .N_SYN(280.0), .JITTER_PPM(1000)) u_rf (
    .ftw(ftw_active), .f_ref_hz(F_O), .err_sig(err_sig));

  always #5 ref_clk = !ref_clk;
  always @(posedge gen_clk) if (det_done) n_detect++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input real off);
    int  cyc = 0;
    int  det0;
    real e;
    rst_n = 1'b1;
    #3 rst_n = 1'b0;
    ftw_init = ftw_t'(longint'(real'(FTW_NOM) * (1.0 + off)));
    #1000 rst_n = 1'b1;
    det0 = n_detect;
    // the lock flag means nothing until the generated clock has clocked the reset in
    repeat (4) begin
      @(posedge gen_clk);
      cyc++;
    end
    while (!locked && !cal_fail && cyc < 400000) begin
      @(posedge gen_clk);
      cyc++;
    end
    e = (real'(ftw_active) * F_SYS / (2.0 ** 48)) / F_O - 1.0;
    check(locked, $sformatf("locked from %f ppm", off * 1.0e6));
    check(e < 80.0e-6 && e > -80.0e-6, $sformatf("residual %f ppm", e * 1.0e6));
    check(cyc < 100000, $sformatf("calibration took %0d cycles", cyc));
    check(n_detect - det0 >= 2, "more than one detection");
    $display("start %f ppm: locked after %0d cycles (%f ms), %0d detections, residual %f ppm",
             off * 1.0e6, cyc, real'(cyc) / 5000.0, n_detect - det0, e * 1.0e6);
  endtask

  // async reset needs a falling edge, not just a low initial value
  initial #2 rst_n = 1'b0;

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(1500.0e-6);
    run(-0.03);
    run(0.03);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
