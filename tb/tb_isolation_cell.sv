// tb_isolation_cell: checks that the isolation cell clamps every output bit to 1 while
// isolated and passes the input unchanged otherwise, over random inputs.
module tb_isolation_cell;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int W = 9;
  logic iso_en;
  logic [W-1:0] d_in, d_out;
  int checks = 0, failures = 0;

  isolation_cell #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      iso_en = 1'($urandom);
      d_in   = W'($urandom);
      #1;
      checks++;
      if (d_out !== (iso_en ? {W{1'b1}} : d_in)) begin
        failures++;
        $display("FAIL iso=%0b in=%0h out=%0h", iso_en, d_in, d_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
