// tb_sensor_fifo: self-checking testbench of the 512 x 8 FIFO against a queue model.
// It fills the FIFO to full (writes beyond are dropped), drains it to empty (reads beyond
// give nothing new), then runs random simultaneous reads and writes, comparing data, count,
// full and empty every cycle. Read data appear one edge after the read.
module tb_sensor_fifo;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int DEPTH = 512, WIDTH = 8;

  logic clk = 1'b0, rst_n = 1'b1, wr_en = 1'b0, rd_en = 1'b0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(DEPTH):0] count;
  logic [WIDTH-1:0] model[$];
  logic [WIDTH-1:0] exp_rd;
  bit   exp_valid = 0;
  int checks = 0, failures = 0;

  sensor_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // one cycle with the given request; model updated like the FIFO
  task automatic cycle(input bit w, input bit r);
    bit do_w, do_r;
    wr_en   = w;
    rd_en   = r;
    wr_data = WIDTH'($urandom);
    do_w = w && (model.size() < DEPTH);
    do_r = r && (model.size() > 0);
    @(posedge clk);
    #1;
    if (do_r) begin
      exp_rd = model.pop_front();
      check(rd_data == exp_rd, $sformatf("read %0h expected %0h", rd_data, exp_rd));
    end
    if (do_w) model.push_back(wr_data);
    check(int'(count) == model.size(), $sformatf("count %0d expected %0d", count, model.size()));
    check(full == (model.size() == DEPTH), "full flag");
    check(empty == (model.size() == 0), "empty flag");
  endtask

  // async reset needs a falling edge, not just a low initial value
  initial #2 rst_n = 1'b0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < DEPTH + 5; i++) cycle(1, 0);
    check(full, "full after 512 writes");
    for (int i = 0; i < DEPTH + 5; i++) cycle(0, 1);
    check(empty, "empty after draining");
    for (int i = 0; i < 4000; i++) cycle(1'($urandom), 1'($urandom));
    for (int i = 0; i < 3000; i++) cycle(($urandom_range(3) != 0), ($urandom_range(3) == 0));
    for (int i = 0; i < 3000; i++) cycle(($urandom_range(3) == 0), ($urandom_range(3) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
