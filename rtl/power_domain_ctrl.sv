// power_domain_ctrl: power-gating and isolation sequence of one power-gated domain.
//
// Going to sleep, the isolation cells are enabled first and, ISO_DLY cycles later, the
// power-gating cells (PGCs) cut the virtual supply. Waking up runs the reverse order: the
// PGCs are switched on first and, WAKE_DLY cycles later (time for the virtual supply to
// recover), the isolation is released. This order follows the power management control
// sequence of the low-power baseband; the two delays are this design's choice.
//
// Interface / timing: on_req is the wanted state. pgc_on drives the PGC enables, iso_en the
// isolation cells, active is high only when the domain is powered and not isolated. After
// reset the domain is asleep (pgc_on=0, iso_en=1). A change of on_req during a sequence
// takes effect when that sequence has finished.
module power_domain_ctrl #(
  parameter int unsigned ISO_DLY  = 4,
  parameter int unsigned WAKE_DLY = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic on_req,
  output logic pgc_on,
  output logic iso_en,
  output logic active
);

  typedef enum logic [1:0] {PD_SLEEP, PD_WAKE, PD_ACTIVE, PD_ISOLATE} pd_state_e;

  localparam int unsigned DW = $clog2((ISO_DLY > WAKE_DLY ? ISO_DLY : WAKE_DLY) + 1);

  pd_state_e     st;
  logic [DW-1:0] dly;

  assign pgc_on = (st != PD_SLEEP);
  assign iso_en = (st != PD_ACTIVE);
  assign active = (st == PD_ACTIVE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= PD_SLEEP;
      dly <= '0;
    end else begin
      unique case (st)
        PD_SLEEP: if (on_req) begin
          st  <= PD_WAKE;
          dly <= '0;
        end
        PD_WAKE: begin
          if (dly == DW'(WAKE_DLY - 1)) begin
            st  <= PD_ACTIVE;
            dly <= '0;
          end else begin
            dly <= dly + 1'b1;
          end
        end
        PD_ACTIVE: if (!on_req) begin
          st  <= PD_ISOLATE;
          dly <= '0;
        end
        PD_ISOLATE: begin
          if (dly == DW'(ISO_DLY - 1)) begin
            st  <= PD_SLEEP;
            dly <= '0;
          end else begin
            dly <= dly + 1'b1;
          end
        end
        default: st <= PD_SLEEP;
      endcase
    end
  end

  // The supply may only be cut while the domain is isolated.
  assert property (@(posedge clk) disable iff (!rst_n) !pgc_on |-> iso_en)
    else $error("power_domain_ctrl: PGD powered off without isolation");

endmodule
