// wsn_power_manager: power manager of the wireless sensor node's transfer domain.
//
// The node has three power-gated domains (PGDs): the MT-CDMA transmitter, the OFDM
// down-link receiver and the OFDM up-link transmitter. They are never needed together, so
// in each operation mode only the PGD of that mode may be powered and the other two sleep.
// In the two transmit modes the transmitter also sleeps while the sensor FIFO fills; when
// the data storage is complete (fifo_full) it is woken, and this design lets it sleep again
// once it has drained the FIFO (fifo_empty while active). The down-link receiver is
// powered for its whole mode. The mode encoding and the sleep-after-drain rule are this
// design's choices; the per-mode gating and wake-on-full follow the node's description.
//
// Each PGD has its own power_domain_ctrl (isolate, then cut power; power up, then release
// isolation). Vectors are indexed by PGD_MTCDMA_TX, PGD_OFDM_DLRX, PGD_OFDM_ULTX.
module wsn_power_manager
  import ecrystal_pkg::*;
#(
  parameter int unsigned ISO_DLY  = 4,
  parameter int unsigned WAKE_DLY = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  wsn_mode_e  mode,
  input  logic       fifo_full,
  input  logic       fifo_empty,
  output logic [2:0] pgc_on,
  output logic [2:0] iso_en,
  output logic [2:0] active
);

  logic       tx_mode, tx_pgd_active, tx_want;
  logic [2:0] on_req;

  assign tx_mode       = (mode == WSN_MTCDMA_TX) || (mode == WSN_OFDM_ULTX);
  assign tx_pgd_active = (mode == WSN_MTCDMA_TX) ? active[PGD_MTCDMA_TX] : active[PGD_OFDM_ULTX];

  // Transmit request: set when the FIFO is full, cleared when the active transmitter has
  // emptied it or when the node leaves the transmit modes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_want <= 1'b0;
    end else if (!tx_mode) begin
      tx_want <= 1'b0;
    end else if (fifo_full) begin
      tx_want <= 1'b1;
    end else if (fifo_empty && tx_pgd_active) begin
      tx_want <= 1'b0;
    end
  end

  always_comb begin
    on_req                = '0;
    on_req[PGD_MTCDMA_TX] = (mode == WSN_MTCDMA_TX) && tx_want;
    on_req[PGD_OFDM_DLRX] = (mode == WSN_OFDM_DLRX);
    on_req[PGD_OFDM_ULTX] = (mode == WSN_OFDM_ULTX) && tx_want;
  end

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
