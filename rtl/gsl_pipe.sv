// gsl_pipe: global search-line pipeline (key skew register).
//
// A search enters the match-line pipeline one stage per clock. Stage s
// (0-based) of a search therefore needs its key bits s cycles after the
// search was presented. This register delays the key bits of stage s by s
// cycles and the search-valid flag by STAGES cycles, so that one new
// search can be presented every cycle. The original circuit does not define how
// the key reaches the later stages; this skew register is this design's
// choice.
//
// Interface: key/valid in at a rising edge; gsl is the skewed key for the
// current cycle (stage-0 bits straight from key); valid_out is valid
// delayed by STAGES cycles and marks the cycle whose match vector belongs
// to a search. rst_n (synchronous, active low) clears the valid pipe.
module gsl_pipe #(
  parameter int unsigned STAGES     = cam_pkg::STAGES,
  parameter int unsigned STAGE_BITS = cam_pkg::STAGE_BITS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [STAGES*STAGE_BITS-1:0] key,
  input  logic                         valid,
  output logic [STAGES*STAGE_BITS-1:0] gsl,
  output logic                         valid_out
);
  // dly[k] holds the whole key delayed by k+1 cycles.
  logic [STAGES-2:0][STAGES*STAGE_BITS-1:0] dly;
  logic [STAGES-1:0]                        vdly;

  always_ff @(posedge clk) begin
    dly[0] <= key;
    for (int k = 1; k < STAGES-1; k++) dly[k] <= dly[k-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vdly <= '0;
    else        vdly <= {vdly[STAGES-2:0], valid};
  end

  always_comb begin
    gsl[0 +: STAGE_BITS] = key[0 +: STAGE_BITS];
    for (int s = 1; s < STAGES; s++)
      gsl[s*STAGE_BITS +: STAGE_BITS] = dly[s-1][s*STAGE_BITS +: STAGE_BITS];
    valid_out = vdly[STAGES-1];
  end
endmodule
