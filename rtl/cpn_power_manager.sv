// cpn_power_manager: power manager of the central processing node (CPN).
//
// The CPN has three power-gated domains: the MT-CDMA receiver (index 0), the OFDM
// down-link transmitter (index 1) and the OFDM up-link receiver (index 2). In each operation
// mode only the domain of that mode is powered; the other two are put to sleep. Each domain
// is sequenced by a power_domain_ctrl (isolate before power-off, power-on before releasing
// isolation). The mode encoding is this design's choice; in CPN_IDLE all domains sleep.
module cpn_power_manager
  import ecrystal_pkg::*;
#(
  parameter int unsigned ISO_DLY  = 4,
  parameter int unsigned WAKE_DLY = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cpn_mode_e  mode,
  output logic [2:0] pgc_on,
  output logic [2:0] iso_en,
  output logic [2:0] active
);

  logic [2:0] on_req;

  assign on_req[0] = (mode == CPN_MTCDMA_RX);
  assign on_req[1] = (mode == CPN_OFDM_DLTX);
  assign on_req[2] = (mode == CPN_OFDM_ULRX);

  for (genvar g = 0; g < 3; g++) begin : g_pgd
    power_domain_ctrl #(
      .ISO_DLY (ISO_DLY),
      .WAKE_DLY(WAKE_DLY)
    ) u_pdc (
      .clk   (clk),
      .rst_n (rst_n),
      .on_req(on_req[g]),
      .pgc_on(pgc_on[g]),
      .iso_en(iso_en[g]),
      .active(active[g])
    );
  end

endmodule
