// reset_sync: reset synchroniser. rst_n_out is asserted (low) at once when rst_n_in falls
// and released two rising edges of clk after rst_n_in rises, so every flop of the clk
// domain leaves reset on the same edge.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      meta      <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_n_out <= meta;
    end
  end
endmodule
