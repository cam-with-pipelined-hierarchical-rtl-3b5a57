// ml_stage: one pipelined match-line stage of STAGE_BITS CAM cells.
//
// A stage is STAGE_BITS cam_cell instances on one match-line segment, one
// match-line sense amplifier (mlsa) and one D flip-flop, as the original
// circuit has them. The segment is a wired-AND: it stays high unless a cell
// reports a miss. The amplifier output is registered on the rising clock
// edge; the registered value is this stage's match result and is the
// Enable of the next stage. A stage whose enable is 0 therefore produces 0
// one cycle later and switches the next stage off.
//
// Timing: sl/slb/enable/pre_n are sampled at a rising edge, out is valid
// after it (one cycle of latency per stage). rst_n is a synchronous,
// active-low clear of the output flip-flop (this design's choice); the
// cells are not reset. The array has no read port (none is described),
// so each cell's stored-bit output is left open.
module ml_stage #(
  parameter int unsigned BITS = cam_pkg::STAGE_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,         // write this segment's cells
  input  logic [BITS-1:0] wd,
  input  logic [BITS-1:0] sl,         // local search line, true rail
  input  logic [BITS-1:0] slb,        // local search line, complement rail
  input  logic            enable,
  input  logic            pre_n,
  output logic            out         // registered stage match = next Enable
);
  logic [BITS-1:0] miss;
  logic            ml, sa_out;

  for (genvar i = 0; i < BITS; i++) begin : g_cell
    cam_cell u_cell (
      .clk (clk), .we (we), .wd (wd[i]),
      .sl (sl[i]), .slb (slb[i]),
      .d (), .miss (miss[i])
    );
  end

  // Match-line segment: high when no cell discharges it.
  always_comb ml = ~|miss;

  mlsa u_mlsa (.ml (ml), .enable (enable), .pre_n (pre_n), .out (sa_out));

  always_ff @(posedge clk) begin
    if (!rst_n) out <= 1'b0;
    else        out <= sa_out;
  end
endmodule
