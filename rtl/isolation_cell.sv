// isolation_cell: output isolation of a power-gated domain (PGD).
//
// While iso_en is high the W signals leaving the PGD are clamped to logic 1, so the
// always-on logic that reads them never sees the undefined levels of a switched-off domain;
// while iso_en is low they pass unchanged. Clamping high follows the power management
// scheme of the low-power baseband; the bus width is a parameter. Purely combinational.
module isolation_cell #(
  parameter int unsigned W = 8
) (
  input  logic         iso_en,
  input  logic [W-1:0] d_in,
  output logic [W-1:0] d_out
);
  assign d_out = iso_en ? '1 : d_in;
endmodule
