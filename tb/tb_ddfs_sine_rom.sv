// tb_ddfs_sine_rom: exhaustive check of the sine map. For every phase a the registered output
// must equal sign * round(2047 * |sin(2*pi*(a + 0.5) / 1024)|), computed here with $sin,
// one clock after the address.
module tb_ddfs_sine_rom;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int ADDR_W = 10, AMP_W = 12;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic [ADDR_W-1:0] phase = '0;
  logic signed [AMP_W-1:0] amp;
  int checks = 0, failures = 0;

  ddfs_sine_rom #(.ADDR_W(ADDR_W), .AMP_W(AMP_W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s;
    int  expv;
    for (int a = 0; a < 2 ** ADDR_W; a++) begin
      phase = ADDR_W'(a);
      @(posedge clk);
      #1;
      s    = $sin(2.0 * PI * (real'(a) + 0.5) / real'(2 ** ADDR_W));
      expv = $rtoi((s < 0.0 ? -s : s) * 2047.0 + 0.5);
      if (s < 0.0) expv = -expv;
      checks++;
      if (int'(amp) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL phase %0d: %0d expected %0d", a, amp, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
