// ddfs: direct digital frequency synthesizer used as the tunable clock generator.
//
// A FTW_W-bit phase accumulator adds the frequency tuning word on every edge of the DDFS
// system clock clk (the reference clock after its integer multiplier), so the output
// frequency is f_out = FTW * f_clk / 2^FTW_W (a 48-bit word as in the DDFS used for the clock
// generator). The top ADDR_W phase bits address the sine map; its sample (dac_code) is what
// the off-chip D/A converter and low-pass filter turn into a sine wave. The generated clock
// clk_out is the accumulator MSB, registered: it is the square wave that a comparator would
// recover from the filtered sine, and its mean frequency is exactly f_out. Taking the MSB as
// the clock instead of modelling DAC, filter and comparator is this design's choice.
//
// Tuning-word input: ftw_in belongs to the calibration controller, which runs on the
// generated clock. The controller holds ftw_in stable and flips ftw_toggle; a two-flop
// synchroniser sees the flip and loads ftw_in into the active word ftw on the next clk edge,
// i.e. 3 clk edges after the flip. The phase keeps running, so the output is phase
// continuous across a change. The controller itself runs on clk_out, so the DDFS cannot wait
// for it after reset: on the first clk edge after reset it loads ftw_init, the un-calibrated
// word, by itself and starts generating the initial clock.
module ddfs
  import ecrystal_pkg::*;
#(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned AMP_W  = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ftw_t                    ftw_init,
  input  ftw_t                    ftw_in,
  input  logic                    ftw_toggle,
  output ftw_t                    ftw,
  output logic [FTW_W-1:0]        phase,
  output logic signed [AMP_W-1:0] dac_code,
  output logic                    clk_out
);

  logic tog_sync, tog_seen, started;

  bit_sync u_tog_sync (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (ftw_toggle),
    .q    (tog_sync)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tog_seen <= 1'b0;
      started  <= 1'b0;
      ftw      <= '0;
      phase    <= '0;
      clk_out  <= 1'b0;
    end else begin
      tog_seen <= tog_sync;
      started  <= 1'b1;
      if (!started) begin
        ftw <= ftw_init;
      end else if (tog_sync != tog_seen) begin
        ftw <= ftw_in;
      end
      phase   <= phase + ftw;
      clk_out <= phase[FTW_W-1];
    end
  end

  ddfs_sine_rom #(
    .ADDR_W(ADDR_W),
    .AMP_W (AMP_W)
  ) u_rom (
    .clk  (clk),
    .phase(phase[FTW_W-1 -: ADDR_W]),
    .amp  (dac_code)
  );

endmodule
