// ml_row: one pipelined match line of STAGES x STAGE_BITS CAM cells.
//
// The match line is split into STAGES ml_stage segments. Stage 1 is
// enabled by the search request (Enable1); stage k+1 is enabled by the
// registered match result of stage k (Enable2, Enable3). If stage 1 misses,
// stage 2 is not activated, and so on, so a search that fails early costs
// no sense-amplifier energy in the later stages.
//
// Key bits: stage s (0-based) compares bits [s*STAGE_BITS +: STAGE_BITS]
// (stage 1 holds the least significant six bits; the bit order is this
// design's choice). Because stage s evaluates s cycles after stage 0, the
// search rails of stage s must carry the key of the search that entered s
// cycles earlier: the caller supplies them already skewed.
//
// Timing: en1 with the stage-0 key bits at edge t; stage_out[s] is valid
// after edge t+s+1. stage_out[STAGES-1] is the full 18-bit match of the
// search entered at t, after STAGES edges. One search per cycle.
module ml_row #(
  parameter int unsigned STAGES     = cam_pkg::STAGES,
  parameter int unsigned STAGE_BITS = cam_pkg::STAGE_BITS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         we,
  input  logic [STAGES*STAGE_BITS-1:0] wd,
  input  logic [STAGES*STAGE_BITS-1:0] sl,   // per-stage skewed rails
  input  logic [STAGES*STAGE_BITS-1:0] slb,
  input  logic                         en1,  // Enable1
  input  logic                         pre_n,
  output logic [STAGES-1:0]            stage_out
);
  logic [STAGES-1:0] enable;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    if (s == 0) begin : g_first
      always_comb enable[s] = en1;
    end else begin : g_next
      always_comb enable[s] = stage_out[s-1];
    end

    ml_stage #(.BITS(STAGE_BITS)) u_stage (
      .clk    (clk),
      .rst_n  (rst_n),
      .we     (we),
      .wd     (wd [s*STAGE_BITS +: STAGE_BITS]),
      .sl     (sl [s*STAGE_BITS +: STAGE_BITS]),
      .slb    (slb[s*STAGE_BITS +: STAGE_BITS]),
      .enable (enable[s]),
      .pre_n  (pre_n),
      .out    (stage_out[s])
    );
  end
endmodule
