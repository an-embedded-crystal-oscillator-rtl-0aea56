// ecrystal_pkg: types and constants shared by the eCrystal calibration loop and the
// wireless-sensor-node (WSN) power management.
//
// The 48-bit tuning-word width is the width of the DDFS frequency tuning word. The
// operation-mode encodings of the sensor node and of the central processing node are this
// design's own choice; the three modes of each node are those of the low-power baseband.
package ecrystal_pkg;

  // Width of the DDFS frequency tuning word (FTW = f_out / f_sys * 2^48).
  localparam int unsigned FTW_W = 48;

  typedef logic [FTW_W-1:0] ftw_t;

  // Calibration controller states (operation flow: calibrate, then normal data mode).
  typedef enum logic [2:0] {
    CAL_INIT,    // load the initial tuning word into the clock generator
    CAL_SETTLE,  // wait for a new tuning word to take effect
    CAL_DETECT,  // one counter-based frequency detection running
    CAL_DECIDE,  // compare with the previous detection, pick direction and step
    CAL_LOCKED,  // frequency error below target: normal data transmission
    CAL_FAIL     // no convergence within the iteration budget
  } cal_state_e;

  // Sensor-node operation modes; each owns one power-gated domain (PGD).
  typedef enum logic [1:0] {
    WSN_IDLE     = 2'd0,  // all three PGDs asleep
    WSN_MTCDMA_TX = 2'd1, // MT-CDMA transmitter, woken when the FIFO is full
    WSN_OFDM_DLRX = 2'd2, // OFDM down-link receiver, active for the whole mode
    WSN_OFDM_ULTX = 2'd3  // OFDM up-link transmitter, woken when the FIFO is full
  } wsn_mode_e;

  // Index of each sensor-node PGD in the 3-bit power-control vectors.
  localparam int unsigned PGD_MTCDMA_TX = 0;
  localparam int unsigned PGD_OFDM_DLRX = 1;
  localparam int unsigned PGD_OFDM_ULTX = 2;

  // Central-processing-node operation modes.
  typedef enum logic [1:0] {
    CPN_IDLE      = 2'd0,
    CPN_MTCDMA_RX = 2'd1,
    CPN_OFDM_DLTX = 2'd2,
    CPN_OFDM_ULRX = 2'd3
  } cpn_mode_e;

endpackage
