// rf_error_model: behavioural model (testbench only) of the analog receive path that feeds
// the frequency detector: remote reference tone, band-pass filter, receive synthesizer
// (N_SYN x generated clock), down-mixer, low-pass filter and the RC bias that squares the
// result into a logic signal.
//
// The generated clock frequency is computed from the DDFS tuning word actually in use,
// f_gen = ftw * F_SYS_HZ / 2^48. The mixer output then has the frequency
// f_err = N_SYN * |f_gen - f_ref_hz|, and err_sig is a square wave at f_err. f_ref_hz is the
// frequency the remote tone corresponds to at baseband; a testbench may change it to model a
// drift. Each half period is recomputed, so a new tuning word or reference takes effect within
// one period. Below 1 Hz the output holds still; half periods are at least 1 ps. An optional relative jitter (JITTER_PPM of
// the period, uniform) models the noisy emulated reference. Not synthesizable.
module rf_error_model #(
  parameter real F_SYS_HZ   = 100.0e6,
  parameter real N_SYN      = 280.0,
  parameter int  JITTER_PPM = 0
) (
  input  logic [47:0] ftw,
  input  real         f_ref_hz,
  output logic        err_sig
);
  timeunit 1ns;
  timeprecision 1ps;

  real f_gen, f_err, half_ns, jit;

  initial begin
    err_sig = 1'b0;
    forever begin
      f_gen = real'(ftw) * F_SYS_HZ / (2.0 ** 48);
      f_err = N_SYN * ((f_gen > f_ref_hz) ? (f_gen - f_ref_hz) : (f_ref_hz - f_gen));
      if (f_err < 1.0) begin
        #1000;
      end else begin
        half_ns = 0.5e9 / f_err;
        if (JITTER_PPM > 0) begin
          jit     = (real'($urandom_range(2000000)) - 1000000.0) / 1.0e6;
          half_ns = half_ns * (1.0 + jit * real'(JITTER_PPM) * 1.0e-6);
        end
        // an unreset tuning word can ask for tens of GHz: keep time moving
        if (half_ns < 0.001) half_ns = 0.001;
        #(half_ns);
        err_sig = !err_sig;
      end
    end
  end
endmodule
