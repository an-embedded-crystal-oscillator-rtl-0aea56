// cal_controller: frequency-calibration control of the eCrystal oscillator.
//
// It closes the loop between the counter-based frequency detector and the tunable clock
// generator, following the operation flow of the oscillator: the clock generator starts at
// its initial (un-calibrated) tuning word, the detector measures the error, the clock
// generator is re-tuned, and this repeats until the error is below the target; then the node
// is in normal data mode (locked) until the baseband reports that the error is too large
// (recal_req), which starts calibration again from the current tuning word.
//
// Direction search (as described for the detector): a count N_err gives the size of the error
// but not its sign. The first step is taken in a guessed direction (upwards, this design's
// choice). After each later detection the direction is kept while the new count is not larger
// than the previous one and reversed when it is larger.
//
// Step size (own choice, where only the mapping of eps onto tuning steps is required): the
// estimate eps ~= N_err / (N_SYN * N_CLK) is multiplied by the nominal tuning word, so the
// step is N_err * GAIN with the constant GAIN = FTW_NOMINAL / (N_SYN * N_CLK), rounded. A
// single multiplier by a constant does the whole computation. Lock is declared when
// N_err <= LOCK_THR = TARGET_PPM * 1e-6 * N_SYN * N_CLK, that is when |eps| is under the
// 50 ppm target. After MAX_ITER steps without lock the controller stops in CAL_FAIL.
//
// Interface / timing (clk is the generated clock): ftw is the tuning word for the clock
// generator; ftw_toggle flips each time ftw changes, so the other clock domain can pick the
// new word up. After every change the controller waits SETTLE cycles before det_start.
// det_start is a one-cycle pulse, det_done/det_n_err come back from the detector. step_pulse
// and reverse_pulse mark each tuning step and each direction reversal.
module cal_controller
  import ecrystal_pkg::*;
#(
  parameter int unsigned N_SYN       = 280,     // RF synthesizer multiplication (1.4 GHz / 5 MHz)
  parameter int unsigned N_CLK       = 16384,   // detection window, generated-clock cycles
  parameter int unsigned CNT_W       = 20,      // width of N_err
  parameter int unsigned TARGET_PPM  = 50,      // calibration target
  parameter ftw_t        FTW_NOMINAL = 48'd14073748835533, // 5 MHz from a 100 MHz DDFS clock
  parameter int unsigned MAX_ITER    = 16,
  parameter int unsigned SETTLE      = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ftw_t             ftw_init,
  input  logic             recal_req,
  output logic             det_start,
  input  logic             det_done,
  input  logic [CNT_W-1:0] det_n_err,
  output ftw_t             ftw,
  output logic             ftw_toggle,
  output logic             locked,
  output logic             cal_fail,
  output cal_state_e       state,
  output logic             step_pulse,
  output logic             reverse_pulse
);

  localparam longint unsigned DEN      = longint'(N_SYN) * longint'(N_CLK);
  localparam longint unsigned GAIN     = (longint'(FTW_NOMINAL) + DEN / 2) / DEN;
  localparam longint unsigned LOCK_THR = longint'(TARGET_PPM) * DEN / 64'd1000000;
  localparam int unsigned     GAIN_W   = $clog2(GAIN + 1);
  localparam int unsigned     ITER_W   = $clog2(MAX_ITER + 1);
  localparam int unsigned     SET_W    = $clog2(SETTLE + 1);

  logic [CNT_W-1:0]        n_old, n_new;
  logic                    first, dir_up;
  logic [ITER_W-1:0]       iter;
  logic [SET_W-1:0]        settle_cnt;

  // Step = N_err * GAIN; one bit wider sums detect wrap-around of the tuning word.
  logic [CNT_W+GAIN_W-1:0] step;
  logic [FTW_W:0]          ftw_up, ftw_dn;
  logic                    new_dir_up, larger;

  assign step       = (CNT_W+GAIN_W)'(n_new) * (CNT_W+GAIN_W)'(GAIN);
  assign ftw_up     = {1'b0, ftw} + (FTW_W+1)'(step);
  assign ftw_dn     = {1'b0, ftw} - (FTW_W+1)'(step);
  assign larger     = n_new > n_old;
  assign new_dir_up = first ? 1'b1 : (larger ? !dir_up : dir_up);

  assign locked   = (state == CAL_LOCKED);
  assign cal_fail = (state == CAL_FAIL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= CAL_INIT;
      ftw           <= '0;
      ftw_toggle    <= 1'b0;
      det_start     <= 1'b0;
      n_old         <= '0;
      n_new         <= '0;
      first         <= 1'b1;
      dir_up        <= 1'b1;
      iter          <= '0;
      settle_cnt    <= '0;
      step_pulse    <= 1'b0;
      reverse_pulse <= 1'b0;
    end else begin
      det_start     <= 1'b0;
      step_pulse    <= 1'b0;
      reverse_pulse <= 1'b0;
      unique case (state)
        CAL_INIT: begin
          ftw        <= ftw_init;
          ftw_toggle <= !ftw_toggle;
          first      <= 1'b1;
          iter       <= '0;
          settle_cnt <= '0;
          state      <= CAL_SETTLE;
        end
        CAL_SETTLE: begin
          if (settle_cnt == SET_W'(SETTLE)) begin
            det_start <= 1'b1;
            state     <= CAL_DETECT;
          end else begin
            settle_cnt <= settle_cnt + 1'b1;
          end
        end
        CAL_DETECT: begin
          if (det_done) begin
            n_new <= det_n_err;
            state <= CAL_DECIDE;
          end
        end
        CAL_DECIDE: begin
          settle_cnt <= '0;
          if (64'(n_new) <= LOCK_THR) begin
            state <= CAL_LOCKED;
          end else if (iter == ITER_W'(MAX_ITER)) begin
            state <= CAL_FAIL;
          end else begin
            if (new_dir_up) begin
              ftw <= ftw_up[FTW_W] ? '1 : ftw_up[FTW_W-1:0];   // clamp at the top
            end else begin
              ftw <= ftw_dn[FTW_W] ? '0 : ftw_dn[FTW_W-1:0];   // clamp at zero
            end
            reverse_pulse <= !first && (new_dir_up != dir_up);
            step_pulse    <= 1'b1;
            ftw_toggle    <= !ftw_toggle;
            dir_up        <= new_dir_up;
            n_old         <= n_new;
            first         <= 1'b0;
            iter          <= iter + 1'b1;
            state         <= CAL_SETTLE;
          end
        end
        CAL_LOCKED, CAL_FAIL: begin
          if (recal_req) begin
            first      <= 1'b1;
            iter       <= '0;
            settle_cnt <= '0;
            state      <= CAL_SETTLE;
          end
        end
        default: state <= CAL_INIT;
      endcase
    end
  end

endmodule
