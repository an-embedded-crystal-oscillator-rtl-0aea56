// tb_fsk_workload: the FSK receiver case of the eCrystal oscillator. Baseband clock target
// 14.72 MHz in the 434 MHz band, so the receive synthesizer multiplies by 434/14.72 = 29.48;
// the controller is built with the nearest integer, N_SYN = 29, and a nominal tuning word
// for 14.72 MHz at the 100 MHz DDFS clock. The clock generator starts 1% slow (about
// 14.57 MHz). The loop must lock with |eps| <= 50 ppm within 20 ms (294 400 cycles), even
// though the controller's N_SYN is 1.6% off the true multiplication factor. A second run starts
// 1% fast, where the first guessed direction is wrong and must be reversed.
module tb_fsk_workload;
  import ecrystal_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam real  F_SYS   = 100.0e6;
  localparam real  F_O     = 14.72e6;
  localparam ftw_t FTW_NOM = 48'd41433116571805;   // 14.72 MHz / 100 MHz * 2^48

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
  int checks = 0, failures = 0, n_reverse = 0;

  wsn_ecrystal_top #(.N_SYN(29), .FTW_NOMINAL(FTW_NOM)) dut (
    .ref_clk, .rst_n, .err_sig, .ftw_init, .recal_req(1'b0), .gen_clk, .dac_code, .ftw_active,
    .locked, .cal_fail, .cal_state, .cal_step, .cal_reverse, .det_done, .det_n_err,
    .mode(WSN_IDLE), .sample_valid(1'b0), .sample_data(8'h00), .fifo_rd_data, .fifo_full,
    .fifo_empty, .fifo_count, .pgd_out_raw('1), .pgd_out, .pgc_on, .iso_en, .pgd_active,
    .cpn_clk(ref_clk), .cpn_rst_n(rst_n), .cpn_mode(CPN_IDLE), .cpn_pgc_on, .cpn_iso_en,
    .cpn_active);

  rf_error_model #(.F_SYS_HZ(F_SYS), .N_SYN(434.0 / 14.72)) u_rf (
    .ftw(ftw_active), .f_ref_hz(F_O), .err_sig(err_sig));

  always #5 ref_clk = !ref_clk;
  always @(posedge gen_clk) if (cal_reverse) n_reverse++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input real off);
    int  cyc = 0;
    real e;
    rst_n = 1'b1;
    #3 rst_n = 1'b0;
    ftw_init = ftw_t'(longint'(real'(FTW_NOM) * (1.0 + off)));
    #1000 rst_n = 1'b1;
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
    check(locked, $sformatf("locked from %f%%", off * 100.0));
    check(e < 50.0e-6 && e > -50.0e-6, $sformatf("residual %f ppm", e * 1.0e6));
    check(cyc < 294400, $sformatf("calibration took %0d cycles", cyc));
    $display("start %f%%: locked after %0d cycles (%f ms), residual %f ppm, f = %f MHz",
             off * 100.0, cyc, real'(cyc) / 14720.0, e * 1.0e6,
             real'(ftw_active) * F_SYS / (2.0 ** 48) / 1.0e6);
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
    run(-0.01);
    run(0.01);
    check(n_reverse > 0, "direction reversed in the fast-start run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
