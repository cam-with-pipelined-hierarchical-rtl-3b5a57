// cam_18x64: 18-bit x 64-word NOR CAM with pipelined match lines and
// hierarchical search lines.
//
// Organisation (from the original circuit): 64 match lines of 18 cells, each match
// line cut into 3 pipelined stages of 6 cells; the 64 lines form 8
// layers of 8 lines (ml_layer). A search presents an 18-bit key; stage 1
// of every word compares the first six bits, and a word's later stages
// are only enabled when its earlier stages matched. Each layer switches
// on its stage-2 and stage-3 local search lines only when one of its
// words is still matching, so most of the array is idle for most keys.
//
// This design's own choices: the key skew register (gsl_pipe) that lets a
// new search start every cycle; the write port (we, waddr, wdata: one
// word written per rising edge, waddr / 8 selects the layer, waddr % 8
// the line inside it); a synchronous active-low reset of the pipeline
// flip-flops; and the pre_n input, a global precharge control that
// forces every sense amplifier output to 0 while low.
//
// Timing: search_en and search_key are sampled at rising edge t; match
// and match_valid are valid after edge t+3 (3 cycles, one per stage), for
// one cycle. stage_out and lsl_en expose the per-stage activity used to
// save power: stage_out[r][s] is word r's registered stage-s result and
// lsl_en[l][s] shows whether layer l drives its stage-s local search
// lines in the current cycle. No priority encoder is included: the match
// vector is the output.
module cam_18x64
  import cam_pkg::*;
#(
  parameter int unsigned ROWS       = ML_ROWS,
  parameter int unsigned LROWS      = LAYER_ROWS,
  parameter int unsigned NSTAGES    = STAGES,
  parameter int unsigned SBITS      = STAGE_BITS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          pre_n,
  // search port
  input  logic                          search_en,
  input  logic [NSTAGES*SBITS-1:0]      search_key,
  output logic [ROWS-1:0]               match,
  output logic                          match_valid,
  // write port
  input  logic                          we,
  input  logic [$clog2(ROWS)-1:0]       waddr,
  input  logic [NSTAGES*SBITS-1:0]      wdata,
  // activity
  output logic [ROWS-1:0][NSTAGES-1:0]  stage_out,
  output logic [ROWS/LROWS-1:0][NSTAGES-1:0] lsl_en
);
  localparam int unsigned NLAYERS = ROWS / LROWS;
  localparam int unsigned KB      = NSTAGES * SBITS;

  logic [KB-1:0]   gsl;
  logic [ROWS-1:0] we_row;

  gsl_pipe #(.STAGES(NSTAGES), .STAGE_BITS(SBITS)) u_gsl (
    .clk       (clk),
    .rst_n     (rst_n),
    .key       (search_key),
    .valid     (search_en),
    .gsl       (gsl),
    .valid_out (match_valid)
  );

  // Word-line decode of the write port.
  always_comb begin
    we_row = '0;
    if (we) we_row[waddr] = 1'b1;
  end

  for (genvar l = 0; l < NLAYERS; l++) begin : g_layer
    ml_layer #(.ROWS(LROWS), .STAGES(NSTAGES), .STAGE_BITS(SBITS)) u_layer (
      .clk       (clk),
      .rst_n     (rst_n),
      .we_row    (we_row[l*LROWS +: LROWS]),
      .wd        (wdata),
      .gsl       (gsl),
      .en1       (search_en),
      .pre_n     (pre_n),
      .stage_out (stage_out[l*LROWS +: LROWS]),
      .match     (match[l*LROWS +: LROWS]),
      .lsl_en    (lsl_en[l])
    );
  end
endmodule
