// cam_pkg: shared sizes of the pipelined, hierarchically searched NOR CAM.
//
// The array holds ML_ROWS words of KEY_BITS bits. Each word (one match
// line) is cut into STAGES segments of STAGE_BITS cells; a segment is
// only evaluated when the segment before it matched, one clock later.
// The match lines are grouped into layers of LAYER_ROWS lines that share
// one set of local search lines per stage. All numbers are the
// original circuit's: 18 search lines x 64 match lines, 3 stages of 6 cells,
// 8 layers of 8 match lines.
package cam_pkg;
  localparam int unsigned KEY_BITS   = 18;
  localparam int unsigned ML_ROWS    = 64;
  localparam int unsigned STAGES     = 3;
  localparam int unsigned STAGE_BITS = KEY_BITS / STAGES;   // 6
  localparam int unsigned LAYER_ROWS = 8;
endpackage
