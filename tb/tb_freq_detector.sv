// tb_freq_detector: self-checking testbench of the counter-based frequency detector.
// The generated clock runs at 5 MHz; the error signal is a square wave of chosen frequency,
// from well below to 8.4 times the clock (3% offset with N_syn = 280). For every window the
// count must be within one of f_err * N_CLK / f_clk, and done must be set by the N_CLK-th
// clock edge after the edge that samples start.
module tb_freq_detector;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N_CLK = 16384;
  localparam int unsigned CNT_W = 20;
  localparam real         TCLK  = 200.0;   // 5 MHz

  logic             clk = 1'b0, rst_n = 1'b1, err_sig = 1'b0, start = 1'b0;
  logic             busy, done;
  logic [CNT_W-1:0] n_err;
  real              f_err_hz = 0.0;
  int               checks = 0, failures = 0;

  freq_detector #(.N_CLK(N_CLK), .CNT_W(CNT_W)) dut (.*);

  always #(TCLK / 2.0) clk = !clk;

  // Half period in whole picoseconds, so the expected count can use the exact frequency.
  function automatic longint half_ps(input real f);
    return longint'(0.5e12 / f);
  endfunction

  // async reset needs a falling edge, not just a low initial value
  initial #2 rst_n = 1'b0;

  initial begin
    forever begin
      if (f_err_hz < 1.0) #500;
      else begin
        #(real'(half_ps(f_err_hz)) * 1.0e-3);
        err_sig = !err_sig;
      end
    end
  end

  task automatic measure(input real f);
    real exp_n;
    int  cyc;
    f_err_hz = f;
    repeat (20) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    #1;
    start <= 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    exp_n = (f < 1.0) ? 0.0 : real'(N_CLK) * TCLK * 1.0e3 / (2.0 * real'(half_ps(f)));
    checks++;
    if ((real'(n_err) - exp_n) > 1.01 || (exp_n - real'(n_err)) > 1.01) begin
      failures++;
      $display("FAIL f_err=%f Hz: n_err=%0d expected %f", f, n_err, exp_n);
    end
    checks++;
    // start sampled on edge 0; done is set by edge N_CLK
    if (cyc != int'(N_CLK)) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc, N_CLK);
    end
  endtask

  initial begin
    #(TCLK * 5000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    measure(0.0);          // exact frequency: no error edges
    measure(7.0e3);        // 5 ppm
    measure(70.0e3);       // 50 ppm
    measure(2.1e6);        // 1500 ppm, the WBAN prototype's initial offset
    measure(3.3e6);
    measure(14.0e6);       // 1%
    measure(42.0e6);       // 3%, error signal 8.4x the clock
    for (int i = 0; i < 4; i++) measure(real'($urandom_range(40000000, 1000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
