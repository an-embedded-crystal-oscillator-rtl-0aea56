// tb_wsn_ecrystal_top: end-to-end test of the sensor-node core at its default parameters
// (N_SYN = 280, N_CLK = 16384, 48-bit DDFS at 100 MHz, 512 x 8 FIFO).
//
// A behavioural RF path (rf_error_model) turns the DDFS word in use into the error signal.
// Phase 1: the clock generator starts 1500 ppm fast (the WBAN prototype's case) while the
// node is in MT-CDMA TX mode and sensor samples arrive every SAMPLE_DIV generated-clock
// cycles (a faster rate than 610 Hz, scaled so the FIFO still fills only after lock, as the
// FIFO-size budget requires). The loop must lock with |eps| <= 50 ppm, within 20 ms and before
// the FIFO is full. Then the full FIFO must wake the transmitter, whose model drains it
// through the isolation cells; every word read is compared with what was written, and the
// transmitter must go back to sleep. While a domain is isolated its outputs must read all
// ones. Phase 2: the reference drifts by -800 ppm, the baseband asks for recalibration and the
// loop must lock again. Phase 3: a reset with a -3% start (error signal 8.4x faster than the
// clock) must lock too. DL-RX mode and the CPN power manager's modes are exercised as well.
// Each mechanism is counted, and a mechanism that never happened is a failure.
module tb_wsn_ecrystal_top;
  import ecrystal_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam ftw_t FTW_NOM    = 48'd14073748835533;
  localparam real  F_SYS      = 100.0e6;
  localparam real  F_O        = 5.0e6;
  localparam int   SAMPLE_DIV = 160;

  logic ref_clk = 1'b0, rst_n = 1'b1, recal_req = 1'b0;
  logic err_sig;
  ftw_t ftw_init = FTW_NOM;
  logic gen_clk;
  logic signed [11:0] dac_code;
  ftw_t ftw_active;
  logic locked, cal_fail, cal_step, cal_reverse, det_done;
  cal_state_e cal_state;
  logic [19:0] det_n_err;
  wsn_mode_e mode = WSN_MTCDMA_TX;
  logic sample_valid = 1'b0;
  logic [7:0] sample_data = '0;
  logic [7:0] fifo_rd_data;
  logic fifo_full, fifo_empty;
  logic [9:0] fifo_count;
  logic [2:0][8:0] pgd_out_raw = '0;
  logic [2:0][7:0] pgd_out;
  logic [2:0] pgc_on, iso_en, pgd_active;
  logic cpn_clk = 1'b0, cpn_rst_n = 1'b1;
  cpn_mode_e cpn_mode = CPN_IDLE;
  logic [2:0] cpn_pgc_on, cpn_iso_en, cpn_active;
  real f_ref_hz = F_O;

  int checks = 0, failures = 0;
  int n_step = 0, n_reverse = 0, n_lock = 0, n_recal = 0, n_detect = 0, n_fast_err = 0;
  int n_fifo_full = 0, n_wake = 0, n_sleep = 0, n_clamped = 0, n_words = 0, n_dlrx = 0, n_cpn = 0;

  wsn_ecrystal_top dut (.*);

  rf_error_model #(.F_SYS_HZ(F_SYS), .N_SYN(280)) u_rf (
    .ftw(ftw_active), .f_ref_hz(f_ref_hz), .err_sig(err_sig));

  always #5 ref_clk = !ref_clk;
  always #50 cpn_clk = !cpn_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  function automatic real eps_now();
    return (real'(ftw_active) * F_SYS / (2.0 ** 48)) / f_ref_hz - 1.0;
  endfunction

  // ---------------- event counters ----------------
  logic locked_d = 1'b0;
  logic [2:0] pgc_d = '0;
  always @(posedge gen_clk) if (dut.gen_rst_n) begin
    if (cal_step) n_step++;
    if (cal_reverse) n_reverse++;
    if (det_done) begin
      n_detect++;
      if (det_n_err > 20'd16384) n_fast_err++;   // more error edges than clock cycles
    end
    if (locked && !locked_d) n_lock++;
    for (int g = 0; g < 3; g++) begin
      if (pgc_on[g] && !pgc_d[g]) n_wake++;
      if (!pgc_on[g] && pgc_d[g]) n_sleep++;
    end
  end
  // previous values, also kept while the generated-clock domain is still in reset
  always @(posedge gen_clk) begin
    locked_d <= locked;
    pgc_d    <= pgc_on;
  end

  // ---------------- sensor, FIFO scoreboard, modem models ----------------
  logic [7:0] sb[$];
  int div = 0;
  bit full_d = 0;
  bit rd_pending = 0;
  logic [7:0] rd_expect;
  always @(negedge gen_clk) if (rst_n) begin
    // flags sampled here are the values the last posedge produced
    if (rd_pending) begin
      check(fifo_rd_data == rd_expect, $sformatf("FIFO word %0h expected %0h", fifo_rd_data, rd_expect));
      n_words++;
    end
    rd_pending = 0;
    if (fifo_full && !full_d) n_fifo_full++;
    full_d = fifo_full;
    // sensor: one sample every SAMPLE_DIV cycles
    div++;
    sample_valid <= 1'b0;
    if (div >= SAMPLE_DIV) begin
      div = 0;
      if (!fifo_full) begin
        sample_valid <= 1'b1;
        sample_data  <= sample_data + 8'd1;
        sb.push_back(sample_data + 8'd1);
      end
    end
    // modem models: a powered, de-isolated transmitter requests a read every cycle;
    // unpowered domains drive arbitrary values, which the isolation must hide
    for (int g = 0; g < 3; g++) begin
      if (pgc_on[g]) pgd_out_raw[g] <= {1'b1, 8'(g + 16)};
      else           pgd_out_raw[g] <= 9'($urandom);
      if (iso_en[g]) begin
        check(pgd_out[g] == 8'hFF, "isolated outputs clamped high");
        if (!pgc_on[g]) n_clamped++;
      end else begin
        check(pgd_out[g] == 8'(g + 16), "de-isolated outputs pass");
      end
    end
    if ((pgd_active[PGD_MTCDMA_TX] || pgd_active[PGD_OFDM_ULTX]) && !fifo_empty) begin
      if (pgd_active[PGD_MTCDMA_TX]) pgd_out_raw[PGD_MTCDMA_TX][8] <= 1'b0;
      if (pgd_active[PGD_OFDM_ULTX]) pgd_out_raw[PGD_OFDM_ULTX][8] <= 1'b0;
      rd_pending = 1;
      rd_expect  = sb.pop_front();
    end
    if (pgd_active[PGD_OFDM_DLRX]) n_dlrx++;
  end

  // ---------------- CPN power manager ----------------
  // async reset needs a falling edge, not just a low initial value
  // async reset needs a falling edge, not just a low initial value
  initial #2 cpn_rst_n = 1'b0;

  initial #2 rst_n = 1'b0;

  initial begin
    #1000;
    cpn_rst_n = 1'b1;
    for (int i = 1; i < 8; i++) begin
      cpn_mode = cpn_mode_e'(i % 4);
      repeat (40) @(posedge cpn_clk);
      #1;
      check(cpn_active == ((cpn_mode == CPN_IDLE) ? 3'b000 : 3'(1 << (int'(cpn_mode) - 1))),
            $sformatf("CPN mode %s active %b", cpn_mode.name(), cpn_active));
      n_cpn++;
    end
  end

  task automatic wait_lock(input string what, output int cycles);
    cycles = 0;
    // the lock flag means nothing until the generated clock has clocked the reset in
    repeat (4) begin
      @(posedge gen_clk);
      cycles++;
    end
    while (!locked && !cal_fail && cycles < 400000) begin
      @(posedge gen_clk);
      cycles++;
    end
    check(locked, $sformatf("%s: locked (state %s)", what, cal_state.name()));
    check(eps_now() < 50.0e-6 && eps_now() > -50.0e-6,
          $sformatf("%s: residual %f ppm", what, eps_now() * 1.0e6));
    // 20 ms of a 5 MHz clock
    check(cycles < 100000, $sformatf("%s: calibration took %0d cycles", what, cycles));
    $display("%s: locked after %0d generated-clock cycles, residual %f ppm, %0d steps so far",
             what, cycles, eps_now() * 1.0e6, n_step);
  endtask

  initial begin
    #200000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    // ---- phase 1: 1500 ppm fast start, MT-CDMA TX mode ----
    ftw_init = ftw_t'(longint'(real'(FTW_NOM) * (1.0 + 1500.0e-6)));
    #100 rst_n = 1'b1;
    wait_lock("1500 ppm start", cyc);
    check(n_fifo_full == 0, "calibration finished before the FIFO filled");
    check(pgc_on[PGD_MTCDMA_TX] == 1'b0, "transmitter asleep while the FIFO fills");
    wait (fifo_full);
    repeat (40) @(posedge gen_clk);
    check(pgd_active[PGD_MTCDMA_TX], "full FIFO woke the transmitter");
    wait (fifo_empty && !pgc_on[PGD_MTCDMA_TX]);
    check(n_words >= 512, $sformatf("%0d words read back", n_words));
    // ---- DL-RX mode ----
    mode = WSN_OFDM_DLRX;
    repeat (100) @(posedge gen_clk);
    check(pgd_active == 3'b010, "DL-RX mode: receiver alone active");
    mode = WSN_OFDM_ULTX;
    // ---- phase 2: drift and recalibration ----
    f_ref_hz = F_O * (1.0 - 800.0e-6);
    repeat (100) @(posedge gen_clk);
    check(locked, "no recalibration before the request");
    @(negedge gen_clk) recal_req = 1'b1;
    @(negedge gen_clk) recal_req = 1'b0;
    @(negedge gen_clk);
    check(!locked, "recal_req starts calibration");
    n_recal++;
    wait_lock("after -800 ppm drift", cyc);
    // ---- phase 3: -3% start ----
    f_ref_hz = F_O;
    rst_n = 1'b0;
    ftw_init = ftw_t'(longint'(real'(FTW_NOM) * (1.0 - 0.03)));
    #1000 rst_n = 1'b1;
    wait_lock("-3% start", cyc);
    repeat (10) @(posedge gen_clk);
    // ---- mechanism coverage ----
    $display("steps=%0d reversals=%0d detections=%0d fast_err=%0d locks=%0d recal=%0d",
             n_step, n_reverse, n_detect, n_fast_err, n_lock, n_recal);
    $display("fifo_full=%0d wakes=%0d sleeps=%0d clamped=%0d words=%0d dlrx=%0d cpn=%0d",
             n_fifo_full, n_wake, n_sleep, n_clamped, n_words, n_dlrx, n_cpn);
    check(n_step > 0, "tuning steps happened");
    check(n_reverse > 0, "direction reversal happened");
    check(n_fast_err > 0, "error signal faster than the clock was counted");
    check(n_lock >= 3, "three locks");
    check(n_recal > 0, "recalibration happened");
    check(n_fifo_full > 0, "FIFO full happened");
    check(n_wake > 0 && n_sleep > 0, "power-domain wake and sleep happened");
    check(n_clamped > 0, "isolation clamp happened");
    check(n_dlrx > 0, "DL-RX domain active");
    check(n_cpn == 7, "CPN modes exercised");
    check(!cal_fail, "no calibration failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
