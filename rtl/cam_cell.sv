// cam_cell: one NOR-type CAM bit.
//
// The cell stores one data bit D and compares it with a dual-rail search
// line (sl, slb). Following the NOR cell truth table, the cell pulls its
// match-line segment low (miss = 1) when the search value differs from D:
//   sl=1,slb=0 with D=0 -> miss ; sl=0,slb=1 with D=1 -> miss.
// When both rails are low (local search line switched off) neither
// pull-down path conducts and the cell leaves the match line alone. The
// two pull-down paths are modelled exactly: miss = sl&~D | slb&D.
//
// The write port (we, wd) is this design's own addition: the storage
// element is written at the rising clock edge when we is high. The stored
// bit is not reset, as in a memory array.
//
// Interface: clk, we, wd in; sl, slb search rails in; d (stored bit) and
// miss (combinational) out.
module cam_cell (
  input  logic clk,
  input  logic we,
  input  logic wd,
  input  logic sl,
  input  logic slb,
  output logic d,
  output logic miss
);
  always_ff @(posedge clk) begin
    if (we) d <= wd;
  end

  // Two series pull-down paths of the NOR cell: (sl, ~d) and (slb, d).
  always_comb miss = (sl & ~d) | (slb & d);
endmodule
