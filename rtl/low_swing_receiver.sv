// low_swing_receiver: drives one block's local search lines from the
// global search lines.
//
// In the hierarchical search-line scheme the global search lines run the
// full height of the array at a reduced swing, and each local block of
// match lines has receivers that regenerate full-swing local search lines
// (true and complement rail) only when that block has a match line still
// in play. When the receiver is off, both local rails stay low, so no CAM
// cell of the block can discharge its match line and the local search
// lines do not toggle.
//
// This is the logic function only. The reduced global-line swing (0.5 V
// against a 0.9 V supply), the clocked sense stage and the latch of the
// transistor-level receiver are analog properties and are not modelled:
// here the outputs follow gsl combinationally while en is high.
//
// Interface: en (block needs its search lines), gsl[W] in; lsl[W],
// lslb[W] out.
module low_swing_receiver #(
  parameter int unsigned W = cam_pkg::STAGE_BITS
) (
  input  logic         en,
  input  logic [W-1:0] gsl,
  output logic [W-1:0] lsl,
  output logic [W-1:0] lslb
);
  always_comb begin
    lsl  = en ? gsl  : '0;
    lslb = en ? ~gsl : '0;
  end
endmodule
