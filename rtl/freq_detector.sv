// freq_detector: counter-based frequency detector of the eCrystal oscillator.
//
// Two counters measure the same time interval in two clocks. The first counts a fixed
// window of N_CLK cycles of the generated clock (clk, f_o(1+eps)); the second counts the
// rising edges of the down-converted error signal (err_sig, N_syn*f_o*|eps|) in that window.
// The calibration control turns the ratio into the frequency error, since
// eps ~= N_err / (N_syn * N_clk). This structure, two incrementers with registers, one clocked
// by the generated clock and one by the buffered error signal, follows the detector
// architecture it implements.
//
// Clock crossing (own choice): the error counter runs freely in the err_sig domain and
// publishes a Gray-coded copy. The clk domain synchronises that copy with two flops,
// converts it back to binary and takes the difference of a snapshot at the start and one
// at the end of the window. One bit changes per error edge, so a sample is never off by more
// than one count. The error signal may be faster than clk: with the 3% maximum offset
// and N_syn = 280 it runs at about 8.4 times the generated clock.
//
// Interface / timing: pulse start for one cycle while busy is low. busy rises on the next
// edge; N_CLK cycles later done pulses for one cycle with n_err valid (held until the next
// window ends). Counts are taken modulo 2^CNT_W, so CNT_W must exceed log2 of the largest
// count (8.4 * N_CLK at 3% offset).
module freq_detector #(
  parameter int unsigned N_CLK = 16384,  // detection window in generated-clock cycles
  parameter int unsigned CNT_W = 20      // width of the error counter and of n_err
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             err_sig,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [CNT_W-1:0] n_err
);

  localparam int unsigned WIN_W = $clog2(N_CLK + 1);

  // ---------------- error-signal domain: free-running counter with Gray copy -------------
  logic [CNT_W-1:0] err_bin, err_bin_nxt, err_gray;

  assign err_bin_nxt = err_bin + 1'b1;

  always_ff @(posedge err_sig or negedge rst_n) begin
    if (!rst_n) begin
      err_bin  <= '0;
      err_gray <= '0;
    end else begin
      err_bin  <= err_bin_nxt;
      err_gray <= err_bin_nxt ^ (err_bin_nxt >> 1);
    end
  end

  // ---------------- generated-clock domain ------------------------------------------------
  logic [CNT_W-1:0] gray_meta, gray_sync, sync_bin, snap;
  logic [WIN_W-1:0] win_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gray_meta <= '0;
      gray_sync <= '0;
    end else begin
      gray_meta <= err_gray;
      gray_sync <= gray_meta;
    end
  end

  // Gray to binary: bit i is the XOR of all Gray bits at and above i.
  always_comb begin
    for (int i = 0; i < int'(CNT_W); i++) begin
      sync_bin[i] = ^(gray_sync >> i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      win_cnt <= '0;
      snap    <= '0;
      n_err   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          win_cnt <= '0;
          snap    <= sync_bin;
        end
      end else if (win_cnt == WIN_W'(N_CLK - 1)) begin
        busy  <= 1'b0;
        done  <= 1'b1;
        n_err <= sync_bin - snap;
      end else begin
        win_cnt <= win_cnt + 1'b1;
      end
    end
  end

  // A start while a window runs is ignored by the logic; flag it as a protocol error.
  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("freq_detector: start while busy");

endmodule
