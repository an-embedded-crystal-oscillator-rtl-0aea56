// wsn_ecrystal_top: digital core of a wireless sensor node (WSN) whose reference clock comes
// from an embedded crystal (eCrystal) oscillator instead of a quartz crystal.
//
// eCrystal loop: the DDFS clock generator (ddfs, on the DDFS system clock ref_clk) makes the
// generated clock gen_clk from a 48-bit tuning word; the external RF path mixes the remote
// reference tone with the receive synthesizer (N_syn x gen_clk) and delivers the
// down-converted error signal err_sig at N_syn * f_o * |eps|. The counter-based frequency
// detector counts err_sig edges in a window of N_CLK generated-clock cycles, and the
// calibration controller turns the count into tuning steps until the error is below 50 ppm
// (locked); recal_req from the baseband starts calibration again. Detector and controller
// run on gen_clk, the clock they calibrate, and the tuning word crosses to ref_clk with a
// toggle handshake inside the DDFS.
//
// Baseband infrastructure, clocked by gen_clk: the 512 x 8-bit sensor FIFO (always on)
// collects samples; the WSN power manager powers only the power-gated domain (PGD) of the
// current mode and wakes a transmitter when the FIFO is full. The modems themselves are not
// part of this RTL: each PGD's outputs enter as pgd_out_raw and leave through isolation
// cells (clamped high while isolated). Bit 8 of each PGD bus is that domain's FIFO read
// request, active low, so the clamp reads as "no request"; bits 7:0 are brought out.
// The central processing node's power manager stands beside it with its own clock,
// reset and mode ports.
//
// Resets: rst_n is asynchronous; each clock domain gets a synchronised release. Signals on
// the sensor and modem ports are taken to be synchronous to gen_clk.
module wsn_ecrystal_top
  import ecrystal_pkg::*;
#(
  parameter int unsigned N_SYN       = 280,
  parameter int unsigned N_CLK       = 16384,
  parameter int unsigned CNT_W       = 20,
  parameter int unsigned TARGET_PPM  = 50,
  parameter ftw_t        FTW_NOMINAL = 48'd14073748835533,
  parameter int unsigned MAX_ITER    = 16,
  parameter int unsigned SETTLE      = 64,
  parameter int unsigned ADDR_W      = 10,
  parameter int unsigned AMP_W       = 12,
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned FIFO_W      = 8,
  parameter int unsigned ISO_DLY     = 4,
  parameter int unsigned WAKE_DLY    = 16
) (
  // eCrystal oscillator
  input  logic                     ref_clk,
  input  logic                     rst_n,
  input  logic                     err_sig,
  input  ftw_t                     ftw_init,
  input  logic                     recal_req,
  output logic                     gen_clk,
  output logic signed [AMP_W-1:0]  dac_code,
  output ftw_t                     ftw_active,
  output logic                     locked,
  output logic                     cal_fail,
  output cal_state_e               cal_state,
  output logic                     cal_step,
  output logic                     cal_reverse,
  output logic                     det_done,
  output logic [CNT_W-1:0]         det_n_err,
  // WSN baseband infrastructure (gen_clk domain)
  input  wsn_mode_e                mode,
  input  logic                     sample_valid,
  input  logic [FIFO_W-1:0]        sample_data,
  output logic [FIFO_W-1:0]        fifo_rd_data,
  output logic                     fifo_full,
  output logic                     fifo_empty,
  output logic [$clog2(FIFO_DEPTH):0] fifo_count,
  input  logic [2:0][FIFO_W:0]     pgd_out_raw,
  output logic [2:0][FIFO_W-1:0]   pgd_out,
  output logic [2:0]               pgc_on,
  output logic [2:0]               iso_en,
  output logic [2:0]               pgd_active,
  // central processing node power manager
  input  logic                     cpn_clk,
  input  logic                     cpn_rst_n,
  input  cpn_mode_e                cpn_mode,
  output logic [2:0]               cpn_pgc_on,
  output logic [2:0]               cpn_iso_en,
  output logic [2:0]               cpn_active
);

  logic             ref_rst_n, gen_rst_n, cpn_rst_sync_n;
  logic             det_start;
  ftw_t             ftw_ctrl;
  logic             ftw_toggle;
  logic [2:0][FIFO_W:0] pgd_iso;
  logic             fifo_rd_en;
  logic             gen_run_ref, ftw_toggle_ref;

  reset_sync u_ref_rst (.clk(ref_clk), .rst_n_in(rst_n),     .rst_n_out(ref_rst_n));
  reset_sync u_gen_rst (.clk(gen_clk), .rst_n_in(rst_n),     .rst_n_out(gen_rst_n));
  reset_sync u_cpn_rst (.clk(cpn_clk), .rst_n_in(cpn_rst_n), .rst_n_out(cpn_rst_sync_n));

  // The DDFS takes tuning words only once the controller has left reset: before the
  // generated clock has run, the controller's toggle flop means nothing. gen_rst_n is
  // brought into the ref_clk domain, and while it is low the DDFS sees no toggle. The
  // controller clears its toggle in reset, so the gate opens on a stable zero.
  bit_sync u_gen_run (.clk(ref_clk), .rst_n(ref_rst_n), .d(gen_rst_n), .q(gen_run_ref));
  assign ftw_toggle_ref = ftw_toggle && gen_run_ref;

  // ---------------- clock generator ----------------
  ddfs #(
    .ADDR_W(ADDR_W),
    .AMP_W (AMP_W)
  ) u_ddfs (
    .clk       (ref_clk),
    .rst_n     (ref_rst_n),
    .ftw_init  (ftw_init),
    .ftw_in    (ftw_ctrl),
    .ftw_toggle(ftw_toggle_ref),
    .ftw       (ftw_active),
    .phase     (),
    .dac_code  (dac_code),
    .clk_out   (gen_clk)
  );

  // ---------------- frequency detector ----------------
  freq_detector #(
    .N_CLK(N_CLK),
    .CNT_W(CNT_W)
  ) u_fd (
    .clk    (gen_clk),
    .rst_n  (gen_rst_n),
    .err_sig(err_sig),
    .start  (det_start),
    .busy   (),
    .done   (det_done),
    .n_err  (det_n_err)
  );

  // ---------------- calibration control ----------------
  cal_controller #(
    .N_SYN      (N_SYN),
    .N_CLK      (N_CLK),
    .CNT_W      (CNT_W),
    .TARGET_PPM (TARGET_PPM),
    .FTW_NOMINAL(FTW_NOMINAL),
    .MAX_ITER   (MAX_ITER),
    .SETTLE     (SETTLE)
  ) u_cal (
    .clk          (gen_clk),
    .rst_n        (gen_rst_n),
    .ftw_init     (ftw_init),
    .recal_req    (recal_req),
    .det_start    (det_start),
    .det_done     (det_done),
    .det_n_err    (det_n_err),
    .ftw          (ftw_ctrl),
    .ftw_toggle   (ftw_toggle),
    .locked       (locked),
    .cal_fail     (cal_fail),
    .state        (cal_state),
    .step_pulse   (cal_step),
    .reverse_pulse(cal_reverse)
  );

  // ---------------- sensor FIFO and WSN power management ----------------
  for (genvar g = 0; g < 3; g++) begin : g_iso
    isolation_cell #(.W(FIFO_W + 1)) u_iso (
      .iso_en(iso_en[g]),
      .d_in  (pgd_out_raw[g]),
      .d_out (pgd_iso[g])
    );
    assign pgd_out[g] = pgd_iso[g][FIFO_W-1:0];
  end

  // Only the transmitters read the FIFO; their request bit is active low.
  assign fifo_rd_en = !pgd_iso[PGD_MTCDMA_TX][FIFO_W] || !pgd_iso[PGD_OFDM_ULTX][FIFO_W];

  sensor_fifo #(
    .DEPTH(FIFO_DEPTH),
    .WIDTH(FIFO_W)
  ) u_fifo (
    .clk    (gen_clk),
    .rst_n  (gen_rst_n),
    .wr_en  (sample_valid),
    .wr_data(sample_data),
    .rd_en  (fifo_rd_en),
    .rd_data(fifo_rd_data),
    .full   (fifo_full),
    .empty  (fifo_empty),
    .count  (fifo_count)
  );

  wsn_power_manager #(
    .ISO_DLY (ISO_DLY),
    .WAKE_DLY(WAKE_DLY)
  ) u_wsn_pm (
    .clk       (gen_clk),
    .rst_n     (gen_rst_n),
    .mode      (mode),
    .fifo_full (fifo_full),
    .fifo_empty(fifo_empty),
    .pgc_on    (pgc_on),
    .iso_en    (iso_en),
    .active    (pgd_active)
  );

  // ---------------- CPN power manager (separate node) ----------------
  cpn_power_manager #(
    .ISO_DLY (ISO_DLY),
    .WAKE_DLY(WAKE_DLY)
  ) u_cpn_pm (
    .clk   (cpn_clk),
    .rst_n (cpn_rst_sync_n),
    .mode  (cpn_mode),
    .pgc_on(cpn_pgc_on),
    .iso_en(cpn_iso_en),
    .active(cpn_active)
  );

endmodule
