// mlsa: match-line sense amplifier of one pipeline stage.
//
// The match line is precharged high and the segment's cells pull it low
// on a miss. The amplifier turns the match line into a full-swing logic
// level, and only when its stage is enabled (the previous stage matched):
//   pre_n = 0 (precharge phase, active low)  -> out = 0
//   enable = 0 (stage switched off)          -> out = 0
//   enable = 1, match line high              -> out = 1
//   enable = 1, match line low               -> out = 0
// These are the original circuit's rules. The transistor circuit (keeper,
// precharge device, low-swing sensing) is not modelled; the output is the
// logic function of those rules, combinational.
module mlsa (
  input  logic ml,      // match line: 1 = no cell pulled it down
  input  logic enable,  // 1 when all earlier stages matched
  input  logic pre_n,   // precharge, active low
  output logic out      // V_OUT,MLSA
);
  always_comb out = pre_n & enable & ml;
endmodule
