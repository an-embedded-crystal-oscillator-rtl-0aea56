// ddfs_sine_rom: sine map of the direct digital frequency synthesizer.
//
// Maps the top ADDR_W bits of the phase accumulator onto a signed AMP_W-bit sine sample.
// Only a quarter wave is stored (2^(ADDR_W-2) words of AMP_W-1 bits); the other three
// quarters follow from symmetry: bit ADDR_W-2 mirrors the index, bit ADDR_W-1 negates the
// sample. Word i holds round((2^(AMP_W-1)-1) * sin(pi/2 * (i + 0.5) / 2^(ADDR_W-2))); the
// half-step offset makes the mirrored quarters exact. The table is computed at elaboration
// time, so changing ADDR_W or AMP_W needs no data file. The quarter-wave compression is this
// design's choice; the sine map itself is part of the DDFS architecture.
//
// Timing: one register stage, amp is valid one clk edge after phase.
module ddfs_sine_rom #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned AMP_W  = 12
) (
  input  logic                     clk,
  input  logic [ADDR_W-1:0]        phase,
  output logic signed [AMP_W-1:0]  amp
);

  localparam int unsigned Q_W     = ADDR_W - 2;
  localparam int unsigned Q_DEPTH = 2 ** Q_W;
  localparam real         PI      = 3.14159265358979323846;

  typedef logic [AMP_W-2:0] quarter_t [Q_DEPTH];

  function automatic quarter_t make_quarter();
    quarter_t t;
    for (int i = 0; i < int'(Q_DEPTH); i++) begin
      t[i] = (AMP_W-1)'($rtoi($sin(PI / 2.0 * (real'(i) + 0.5) / real'(Q_DEPTH))
                             * real'(2 ** (AMP_W - 1) - 1) + 0.5));
    end
    return t;
  endfunction

  localparam quarter_t QUARTER = make_quarter();

  logic [Q_W-1:0]   idx;
  logic [AMP_W-2:0] mag;

  assign idx = phase[ADDR_W-2] ? ~phase[Q_W-1:0] : phase[Q_W-1:0];
  assign mag = QUARTER[idx];

  always_ff @(posedge clk) begin
    amp <= phase[ADDR_W-1] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  end

endmodule
