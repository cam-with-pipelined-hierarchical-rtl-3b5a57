// ml_layer: one 18 x 8 match-line layer with hierarchical search lines.
//
// ROWS pipelined match lines (ml_row) share, per stage, one set of local
// search lines driven by a low_swing_receiver from the global search
// lines. The receiver of stage 1 is on while a search is presented
// (en1). The receiver of stage s+1 is on only if at least one match line
// of this layer matched in stage s, i.e. the OR of the layer's registered
// stage-s results. A layer whose words all missed the first segment
// therefore keeps its stage-2 and stage-3 local search lines quiet as
// well as its sense amplifiers.
//
// The OR is taken over the stage flip-flop outputs that also enable the
// next stage, rather than over a separate flip-flop of its own; the
// result and its timing are the same.
//
// Interface: we_row selects the row written with wd at the rising edge;
// gsl carries the global search key, already skewed so that the bits of
// stage s belong to the search that entered s cycles earlier. match[r] is
// stage_out[r][STAGES-1]; lsl_en shows which local search lines were on
// in the current cycle.
module ml_layer #(
  parameter int unsigned ROWS       = cam_pkg::LAYER_ROWS,
  parameter int unsigned STAGES     = cam_pkg::STAGES,
  parameter int unsigned STAGE_BITS = cam_pkg::STAGE_BITS
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic [ROWS-1:0]                         we_row,
  input  logic [STAGES*STAGE_BITS-1:0]            wd,
  input  logic [STAGES*STAGE_BITS-1:0]            gsl,
  input  logic                                    en1,
  input  logic                                    pre_n,
  output logic [ROWS-1:0][STAGES-1:0]             stage_out,
  output logic [ROWS-1:0]                         match,
  output logic [STAGES-1:0]                       lsl_en
);
  localparam int unsigned KB = STAGES * STAGE_BITS;

  logic [KB-1:0] lsl, lslb;

  for (genvar s = 0; s < STAGES; s++) begin : g_rx
    if (s == 0) begin : g_first
      always_comb lsl_en[s] = en1;
    end else begin : g_next
      always_comb begin
        lsl_en[s] = 1'b0;
        for (int r = 0; r < ROWS; r++) lsl_en[s] |= stage_out[r][s-1];
      end
    end

    low_swing_receiver #(.W(STAGE_BITS)) u_rx (
      .en   (lsl_en[s]),
      .gsl  (gsl [s*STAGE_BITS +: STAGE_BITS]),
      .lsl  (lsl [s*STAGE_BITS +: STAGE_BITS]),
      .lslb (lslb[s*STAGE_BITS +: STAGE_BITS])
    );
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    ml_row #(.STAGES(STAGES), .STAGE_BITS(STAGE_BITS)) u_row (
      .clk       (clk),
      .rst_n     (rst_n),
      .we        (we_row[r]),
      .wd        (wd),
      .sl        (lsl),
      .slb       (lslb),
      .en1       (en1),
      .pre_n     (pre_n),
      .stage_out (stage_out[r])
    );
    always_comb match[r] = stage_out[r][STAGES-1];
  end
endmodule
